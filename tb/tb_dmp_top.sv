// tb_dmp_top: end-to-end test of the deterministic multiprocessing system
// at its default size (three CPUs, 16-slot CAM buffers, 64 KiB memory,
// 640x480 VGA).
//
// Two copies of the system run the same three programs side by side. In
// copy A the CPU models never stall; in copy B they idle on a random 40% of
// their cycles, standing for processors running at different and irregular
// speeds. The programs (see cpu_model) contain: stores by all three CPUs to
// one address in the same slice (the first CPU in the epoch's commit order
// must win and the others' copies be erased), a store by CPU0 that CPU1
// reads later in the same slice (communication: CPU1 must halt and read the
// new value after the commit, in its serial turn), CPU1 storing the value it
// read plus one, private stores and reloads (local hits), CPU2 touching
// more addresses than its CAM buffer holds (overflow), two CPUs reading one
// address (shared slots), and a pixel stored into the frame buffer.
//
// Checked: every load returns the value the programs' semantics give;
// final memory holds the expected bytes; both copies produce the same load
// traces and the same memory (determinism across timing); the VGA output
// shows the stored pixel at the top-left corner of a frame; and every
// mechanism happened at least once in copy B or A: local hit, exclusive
// fetch, shared slot, communication halt, overflow halt, slice expiry,
// same-address snoop collision, commit write, erase by commit notice,
// serial-phase bypass, all three phases, and a busy memory queue.
module tb_dmp_top;
  import dmp_pkg::*;
  localparam int unsigned NCPU = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------------------ copy A
  logic [NCPU-1:0] a_req, a_we, a_ack, a_halt, a_retire, a_done, a_exp;
  addr_t a_addr [NCPU];
  data_t a_wdata [NCPU], a_rdata [NCPU];
  phase_e a_phase;
  logic [31:0] a_epoch;
  arb_ev_t a_ev [NCPU];
  logic [15:0] a_icc [NCPU];
  logic [2:0] a_q;
  logic a_hs, a_vs, a_blank, a_fs;
  logic [2:0] a_r, a_g;
  logic [1:0] a_b;

  dmp_top dut_a (
    .clk, .rst_n, .par_slice(16'd32), .ser_slice(16'd4),
    .cpu_req(a_req), .cpu_we(a_we), .cpu_addr(a_addr), .cpu_wdata(a_wdata),
    .cpu_ack(a_ack), .cpu_rdata(a_rdata), .cpu_halt(a_halt), .cpu_retire(a_retire),
    .pix_ce(1'b1), .vga_hsync_n(a_hs), .vga_vsync_n(a_vs), .vga_blank(a_blank),
    .vga_red(a_r), .vga_green(a_g), .vga_blue(a_b), .vga_frame_start(a_fs),
    .phase(a_phase), .epoch(a_epoch), .arb_ev(a_ev), .ic_expired(a_exp),
    .ic_count(a_icc), .mem_q_count(a_q)
  );

  for (genvar i = 0; i < NCPU; i++) begin : g_a
    cpu_model #(.ID(i), .STALL_PCT(0)) u_cpu (
      .clk, .rst_n, .halt(a_halt[i]), .ack(a_ack[i]), .rdata(a_rdata[i]),
      .req(a_req[i]), .we(a_we[i]), .addr(a_addr[i]), .wdata(a_wdata[i]),
      .retire(a_retire[i]), .done(a_done[i]), .ld_done(), .ld_addr(), .ld_data()
    );
  end

  // ------------------------------------------------------------ copy B
  logic [NCPU-1:0] b_req, b_we, b_ack, b_halt, b_retire, b_done, b_exp;
  addr_t b_addr [NCPU];
  data_t b_wdata [NCPU], b_rdata [NCPU];
  phase_e b_phase;
  logic [31:0] b_epoch;
  arb_ev_t b_ev [NCPU];
  logic [15:0] b_icc [NCPU];
  logic [2:0] b_q;
  logic b_hs, b_vs, b_blank, b_fs;
  logic [2:0] b_r, b_g;
  logic [1:0] b_b;

  dmp_top dut_b (
    .clk, .rst_n, .par_slice(16'd32), .ser_slice(16'd4),
    .cpu_req(b_req), .cpu_we(b_we), .cpu_addr(b_addr), .cpu_wdata(b_wdata),
    .cpu_ack(b_ack), .cpu_rdata(b_rdata), .cpu_halt(b_halt), .cpu_retire(b_retire),
    .pix_ce(1'b1), .vga_hsync_n(b_hs), .vga_vsync_n(b_vs), .vga_blank(b_blank),
    .vga_red(b_r), .vga_green(b_g), .vga_blue(b_b), .vga_frame_start(b_fs),
    .phase(b_phase), .epoch(b_epoch), .arb_ev(b_ev), .ic_expired(b_exp),
    .ic_count(b_icc), .mem_q_count(b_q)
  );

  for (genvar i = 0; i < NCPU; i++) begin : g_b
    cpu_model #(.ID(i), .STALL_PCT(40)) u_cpu (
      .clk, .rst_n, .halt(b_halt[i]), .ack(b_ack[i]), .rdata(b_rdata[i]),
      .req(b_req[i]), .we(b_we[i]), .addr(b_addr[i]), .wdata(b_wdata[i]),
      .retire(b_retire[i]), .done(b_done[i]), .ld_done(), .ld_addr(), .ld_data()
    );
  end

  // ------------------------------------------------------------ mechanisms
  typedef enum int {
    M_LOCAL_HIT, M_FETCH, M_SHARED, M_CONFLICT, M_OVERFLOW, M_EXPIRY,
    M_COLLIDE, M_COMMIT_WR, M_ERASED, M_BYPASS, M_COMMIT_PH, M_SERIAL_PH,
    M_QUEUE_BUSY, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"local hit", "exclusive fetch", "shared slot",
    "communication halt", "overflow halt", "slice expiry", "snoop collision",
    "commit write", "erase by notice", "serial bypass", "commit phase",
    "serial phase", "memory queue busy"};
  phase_e a_prev_phase, b_prev_phase;

  task automatic count_ev(arb_ev_t e);
    if (e.local_hit) mech[M_LOCAL_HIT]++;
    if (e.fetch)     mech[M_FETCH]++;
    if (e.shared)    mech[M_SHARED]++;
    if (e.conflict)  mech[M_CONFLICT]++;
    if (e.overflow)  mech[M_OVERFLOW]++;
    if (e.collide)   mech[M_COLLIDE]++;
    if (e.commit_wr) mech[M_COMMIT_WR]++;
    if (e.erased)    mech[M_ERASED]++;
    if (e.bypass)    mech[M_BYPASS]++;
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NCPU; i++) begin
      count_ev(a_ev[i]);
      count_ev(b_ev[i]);
      if (a_phase == PH_PARALLEL && a_exp[i] && a_icc[i] == 16'd32) mech[M_EXPIRY]++;
    end
    if (a_phase == PH_COMMIT && a_prev_phase == PH_PARALLEL) mech[M_COMMIT_PH]++;
    if (a_phase == PH_SERIAL && a_prev_phase == PH_COMMIT) mech[M_SERIAL_PH]++;
    if (a_q != 0 || b_q != 0) mech[M_QUEUE_BUSY]++;
    // phase order: parallel -> commit -> serial -> parallel
    check("phase order A", !(a_prev_phase == PH_PARALLEL && a_phase == PH_SERIAL) &&
                           !(a_prev_phase == PH_SERIAL && a_phase == PH_COMMIT));
    check("phase order B", !(b_prev_phase == PH_PARALLEL && b_phase == PH_SERIAL) &&
                           !(b_prev_phase == PH_SERIAL && b_phase == PH_COMMIT));
    a_prev_phase = a_phase;
    b_prev_phase = b_phase;
  end

  // ------------------------------------------------------------ expected memory
  function automatic data_t exp_mem(addr_t a);
    if (a == 16'h0500) return 8'hA0;
    if (a == 16'h0600) return 8'h5A;
    if (a == 16'h0601) return 8'h5B;
    if (a == 16'h8000) return 8'hE3;
    if (a >= 16'h1000 && a < 16'h1008) return data_t'(8'h10 + (a - 16'h1000));
    if (a >= 16'h2000 && a < 16'h2008) return data_t'(8'h20 + (a - 16'h2000));
    if (a >= 16'h3000 && a < 16'h3014) return data_t'(8'h30 + (a - 16'h3000));
    return 8'h00;
  endfunction

  addr_t probe [$] = '{16'h0500, 16'h0600, 16'h0601, 16'h0700, 16'h8000, 16'h8001};

  initial begin
    int ea, eb, t0;
    for (int m = 0; m < M_NUM; m++) mech[m] = 0;
    a_prev_phase = PH_PARALLEL; b_prev_phase = PH_PARALLEL;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // run until every program has finished in both copies
    t0 = 0;
    while (!(&a_done && &b_done) && t0 < 200000) begin
      @(posedge clk); t0++;
    end
    check("programs finished", &a_done && &b_done);
    // let two more epochs pass so that every buffered store is committed
    ea = a_epoch; eb = b_epoch;
    wait (a_epoch >= ea + 2 && b_epoch >= eb + 2);
    $display("cycles to finish: %0d, epochs A=%0d B=%0d", t0, a_epoch, b_epoch);
    // loads
    for (int i = 0; i < NCPU; i++) begin
      check("loads A", (i == 0 ? g_a[0].u_cpu.errors : i == 1 ? g_a[1].u_cpu.errors : g_a[2].u_cpu.errors) == 0);
      check("loads B", (i == 0 ? g_b[0].u_cpu.errors : i == 1 ? g_b[1].u_cpu.errors : g_b[2].u_cpu.errors) == 0);
    end
    // identical load traces in both copies
    check("trace 0", g_a[0].u_cpu.trace == g_b[0].u_cpu.trace);
    check("trace 1", g_a[1].u_cpu.trace == g_b[1].u_cpu.trace);
    check("trace 2", g_a[2].u_cpu.trace == g_b[2].u_cpu.trace);
    // memory contents
    for (int k = 0; k < 32; k++) begin
      probe.push_back(addr_t'(16'h1000 + k));
      probe.push_back(addr_t'(16'h2000 + k));
      probe.push_back(addr_t'(16'h3000 + k));
    end
    foreach (probe[p]) begin
      check($sformatf("memory A %h", probe[p]), dut_a.u_mem.mem[probe[p]] == exp_mem(probe[p]));
      check($sformatf("memory B %h", probe[p]), dut_b.u_mem.mem[probe[p]] == exp_mem(probe[p]));
    end
    // the stored pixel at the start of the next frame
    @(posedge clk iff a_fs);
    #1 check("VGA pixel (0,0)", {a_r, a_g, a_b} == 8'hE3 && !a_blank);
    @(posedge clk); #1;
    check("VGA pixel (1,0)", {a_r, a_g, a_b} == 8'hE3);   // same stored pixel, scale 4
    repeat (4) @(posedge clk);
    #1 check("VGA pixel (5,0)", {a_r, a_g, a_b} == 8'h00);
    // mechanisms
    for (int m = 0; m < M_NUM; m++) begin
      $display("%-20s %0d", mech_name[m], mech[m]);
      check({"mechanism ", mech_name[m]}, mech[m] > 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
