// tb_dmp_random: randomized invariant test of the whole system at its
// default size. Three CPU models run random programs of loads, stores,
// read-modify-writes and NOPs over eight shared addresses, stalling on a
// random 30% of their cycles, so that the threads communicate constantly.
// Every cycle the testbench checks the tag invariants of the protocol
// across the three CAM buffers:
//   - no address is held twice in one buffer;
//   - an address held Exclusive is held by no other buffer;
//   - all copies of a shared address carry the same R and W bits;
//   - no slot is Shared, Read and Written at once;
// and, every time a commit phase ends, that all buffers are empty. Every
// load is checked against the value the protocol allows: in a parallel
// phase, the CPU's own latest store to that address in this phase if there
// is one, otherwise main memory (which does not change during a parallel
// phase); in the CPU's serial turn, main memory.
module tb_dmp_random;
  import dmp_pkg::*;
  localparam int unsigned NCPU = 3, DEPTH = 16, NOPS = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [NCPU-1:0] req, we, ack, halt, retire, done, exp_s;
  addr_t addr [NCPU];
  data_t wdata [NCPU], rdata [NCPU];
  phase_e phase;
  logic [31:0] epoch;
  arb_ev_t ev [NCPU];
  logic [15:0] icc [NCPU];
  logic [2:0] q;

  dmp_top dut (
    .clk, .rst_n, .par_slice(16'd48), .ser_slice(16'd3),
    .cpu_req(req), .cpu_we(we), .cpu_addr(addr), .cpu_wdata(wdata),
    .cpu_ack(ack), .cpu_rdata(rdata), .cpu_halt(halt), .cpu_retire(retire),
    .pix_ce(1'b0), .vga_hsync_n(), .vga_vsync_n(), .vga_blank(),
    .vga_red(), .vga_green(), .vga_blue(), .vga_frame_start(),
    .phase, .epoch, .arb_ev(ev), .ic_expired(exp_s), .ic_count(icc), .mem_q_count(q)
  );

  for (genvar i = 0; i < NCPU; i++) begin : g_c
    cpu_model #(.ID(i), .STALL_PCT(30), .RANDOM_OPS(NOPS)) u_cpu (
      .clk, .rst_n, .halt(halt[i]), .ack(ack[i]), .rdata(rdata[i]),
      .req(req[i]), .we(we[i]), .addr(addr[i]), .wdata(wdata[i]),
      .retire(retire[i]), .done(done[i]), .ld_done(), .ld_addr(), .ld_data()
    );
  end

  // copies of the CAM buffers' state
  logic  cv [NCPU][DEPTH];
  addr_t ca [NCPU][DEPTH];
  tag_t  ct [NCPU][DEPTH];
  for (genvar i = 0; i < NCPU; i++) begin : g_v
    always_comb begin
      for (int k = 0; k < DEPTH; k++) begin
        cv[i][k] = dut.g_cpu[i].u_arb.u_cam.valid_q[k];
        ca[i][k] = dut.g_cpu[i].u_arb.u_cam.addr_q[k];
        ct[i][k] = dut.g_cpu[i].u_arb.u_cam.tag_q[k];
      end
    end
  end

  // own stores of the current parallel phase
  logic  own_v [NCPU][8];
  data_t own_d [NCPU][8];
  phase_e prev_phase;
  int n_loads, n_conflicts, n_shared, n_commits, n_erased, n_bypass;

  always @(posedge clk) if (rst_n) begin
    // ---- tag invariants
    for (int i = 0; i < NCPU; i++) for (int k = 0; k < DEPTH; k++) if (cv[i][k]) begin
      check("no S/R/W slot", ct[i][k].excl || !(ct[i][k].rd && ct[i][k].wr));
      for (int j = 0; j < NCPU; j++) for (int l = 0; l < DEPTH; l++) begin
        if (cv[j][l] && ca[j][l] == ca[i][k] && !(i == j && l == k)) begin
          check("unique in buffer", i != j);
          check("exclusive is alone", !ct[i][k].excl && !ct[j][l].excl);
          check("shared copies agree", ct[i][k].rd == ct[j][l].rd && ct[i][k].wr == ct[j][l].wr);
        end
      end
    end
    if (prev_phase == PH_COMMIT && phase == PH_SERIAL) begin
      n_commits++;
      for (int i = 0; i < NCPU; i++) for (int k = 0; k < DEPTH; k++)
        check("empty after commit", !cv[i][k]);
    end
    if (phase == PH_COMMIT && prev_phase == PH_PARALLEL)
      for (int i = 0; i < NCPU; i++) for (int a = 0; a < 8; a++) own_v[i][a] = 0;
    // ---- loads and stores completing at this edge
    for (int i = 0; i < NCPU; i++) if (ack[i]) begin
      int a;
      a = int'(addr[i] - 16'h0400);
      if (!we[i]) begin
        n_loads++;
        if (phase == PH_PARALLEL && own_v[i][a])
          check("load returns own store", rdata[i] == own_d[i][a]);
        else
          check("load returns memory", rdata[i] == dut.u_mem.mem[addr[i]]);
      end else if (phase == PH_PARALLEL) begin
        own_v[i][a] = 1; own_d[i][a] = wdata[i];
      end
    end
    for (int i = 0; i < NCPU; i++) begin
      if (ev[i].conflict) n_conflicts++;
      if (ev[i].shared) n_shared++;
      if (ev[i].erased) n_erased++;
      if (ev[i].bypass) n_bypass++;
    end
    prev_phase = phase;
  end

  initial begin
    for (int i = 0; i < NCPU; i++) for (int a = 0; a < 8; a++) begin own_v[i][a] = 0; own_d[i][a] = '0; end
    prev_phase = PH_PARALLEL;
    n_loads = 0; n_conflicts = 0; n_shared = 0; n_commits = 0; n_erased = 0; n_bypass = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&done);
    repeat (200) @(posedge clk);
    $display("loads=%0d conflicts=%0d shared=%0d erased=%0d bypass=%0d commits=%0d epochs=%0d",
             n_loads, n_conflicts, n_shared, n_erased, n_bypass, n_commits, epoch);
    check("loads happened", n_loads > 1000);
    check("conflicts happened", n_conflicts > 0);
    check("sharing happened", n_shared > 0);
    check("erasures happened", n_erased > 0);
    check("serial bypass happened", n_bypass > 0);
    check("commits happened", n_commits > 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
