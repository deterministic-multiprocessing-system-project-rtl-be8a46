// tb_mem_ctrl: self-checking test of the memory controller. Three random
// requesters (one outstanding access each) compete for a synchronous memory
// model kept in the testbench. Checked: every access completes once, to the
// requester that issued it; completions come in grant (arrival) order; read
// data equals a reference memory updated in that order; a requester is never
// passed over more than NCPU-1 times while it waits; a lone access takes two
// cycles from grant to completion; the queue is used.
module tb_mem_ctrl;
  import dmp_pkg::*;
  localparam int unsigned NCPU = 3, QDEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  mem_req_t req [NCPU];
  logic [NCPU-1:0] gnt;
  mem_rsp_t rsp [NCPU];
  logic mem_en, mem_we;
  addr_t mem_addr;
  data_t mem_wdata, mem_rdata;
  logic [2:0] q_count;
  int checks = 0, failures = 0;

  mem_ctrl #(.NCPU(NCPU), .QDEPTH(QDEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // memory model (small address range so that accesses collide)
  data_t mem [256];
  always_ff @(posedge clk) begin
    if (mem_en) begin
      mem_rdata <= mem[mem_addr[7:0]];
      if (mem_we) mem[mem_addr[7:0]] <= mem_wdata;
    end
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // scoreboard: grant order queue with expected read data computed on a
  // reference memory when the access is granted (service is in grant order)
  data_t ref_mem [256];
  int    gq_id [$];
  data_t gq_data [$];
  logic  gq_we [$];
  int    outstanding [NCPU];
  int    passed_over [NCPU];
  int    max_q, n_done, lone_ok;
  logic  lone_mode;
  int    lone_t;

  always @(posedge clk) if (rst_n) begin
    // completions (before this edge's grants are added)
    for (int i = 0; i < NCPU; i++) if (rsp[i].done) begin
      n_done++;
      check("completion expected", gq_id.size() > 0);
      if (gq_id.size() > 0) begin
        check("completion order", gq_id[0] == i);
        if (!gq_we[0]) check("read data", rsp[i].rdata == gq_data[0]);
        void'(gq_id.pop_front()); void'(gq_data.pop_front()); void'(gq_we.pop_front());
      end
      outstanding[i]--;
      if (lone_mode) begin
        check("lone latency", ($time - lone_t) == 20);
        lone_ok++;
      end
    end
    check("one grant", $countones(gnt) <= 1);
    for (int i = 0; i < NCPU; i++) begin
      if (gnt[i]) begin
        check("grant to a valid request", req[i].valid);
        gq_id.push_back(i);
        gq_we.push_back(req[i].we);
        gq_data.push_back(ref_mem[req[i].addr[7:0]]);
        if (req[i].we) ref_mem[req[i].addr[7:0]] = req[i].wdata;
        outstanding[i]++;
        passed_over[i] = 0;
        lone_t = $time;
      end else if (req[i].valid && gnt != '0) begin
        passed_over[i]++;
        check("fairness", passed_over[i] <= NCPU - 1);
      end
    end
    if (int'(q_count) > max_q) max_q = int'(q_count);
  end

  // requesters: one access at a time, held until granted
  logic waiting [NCPU];
  initial begin
    for (int k = 0; k < 256; k++) begin mem[k] = data_t'(k); ref_mem[k] = data_t'(k); end
    for (int i = 0; i < NCPU; i++) begin
      req[i] = '0; outstanding[i] = 0; passed_over[i] = 0; waiting[i] = 0;
    end
    max_q = 0; n_done = 0; lone_ok = 0; lone_mode = 0; lone_t = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // heavy random traffic
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < NCPU; i++) begin
        if (req[i].valid && gnt[i]) begin req[i].valid = 0; waiting[i] = 1; end
      end
      @(posedge clk); #1;
      for (int i = 0; i < NCPU; i++) begin
        if (waiting[i] && outstanding[i] == 0) waiting[i] = 0;
        if (!req[i].valid && !waiting[i] && $urandom_range(0, 3) != 0) begin
          req[i].valid = 1; req[i].we = $urandom_range(0, 1);
          req[i].addr = addr_t'($urandom_range(0, 15)); req[i].wdata = data_t'($urandom);
        end
      end
    end
    // drain
    for (int i = 0; i < NCPU; i++) req[i].valid = 0;
    repeat (20) @(posedge clk);
    // lone accesses: latency from grant to done
    lone_mode = 1;
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      req[n % NCPU] = '{valid: 1'b1, we: 1'b0, addr: addr_t'(n), wdata: '0};
      @(posedge clk); #1;
      req[n % NCPU].valid = 0;
      repeat (5) @(posedge clk);
    end
    check("all completed", gq_id.size() == 0);
    check("queue used", max_q >= 1);
    check("lone accesses", lone_ok == 20);
    $display("done=%0d max_q=%0d", n_done, max_q);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
