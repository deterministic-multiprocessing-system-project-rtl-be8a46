// tb_arbitrator: self-checking test of one arbitrator (ID 1 of 3, CAM depth
// 8) whose two friends, phase state machine and memory controller are
// played by the testbench. Directed sequences walk the read and write
// tables: local hits and misses, friend answers A/B/C, tag changes seen
// through the answers the arbitrator gives to friend snoops, blocking on a
// disallowed tag and on a full CAM buffer, same-address snoop collisions,
// the commit walk (written slots only, in fill order, with a commit notice
// each), erasure on a friend's notice, and serial-phase bypass. Expected
// values come from the tables, not from the design. Latencies are checked:
// a local hit and a write miss are acknowledged one cycle after the request,
// a read miss four cycles after it with this memory stand-in.
module tb_arbitrator;
  import dmp_pkg::*;
  localparam int unsigned NCPU = 3, ID = 1, DEPTH = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cpu_req, cpu_we, cpu_ack, cpu_halt, ic_expired;
  addr_t cpu_addr;
  data_t cpu_wdata, cpu_rdata;
  phase_e phase;
  logic serial_turn, commit_go, commit_done, halted;
  snoop_req_t sn_out;
  snoop_req_t sn_in [NCPU];
  snoop_rsp_e rsp_out [NCPU];
  snoop_rsp_e rsp_in [NCPU];
  mem_req_t mreq;
  logic mgnt;
  mem_rsp_t mrsp;
  arb_ev_t ev;
  int checks = 0, failures = 0;

  arbitrator #(.NCPU(NCPU), .ID(ID), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- memory controller stand-in: grant at once, done two cycles later
  data_t mem [addr_t];
  addr_t mwr_log [$];
  int mpend;
  mem_req_t mcur;
  snoop_req_t fsn  [NCPU];   // friends' snoop buses, driven by the test
  snoop_rsp_e frsp [NCPU];   // friends' answers, driven by the test
  always_comb begin
    for (int j = 0; j < NCPU; j++) begin
      sn_in[j]  = (j == ID) ? sn_out : fsn[j];
      rsp_in[j] = (j == ID) ? SN_INVALID : frsp[j];
    end
  end
  always_comb mgnt = mreq.valid;
  always @(posedge clk) begin
    if (!rst_n) begin
      mpend = 0; mrsp = '0;
    end else begin
      mrsp.done = 0;
      if (mpend > 0) begin
        mpend--;
        if (mpend == 0) begin
          mrsp.done = 1;
          mrsp.rdata = mem.exists(mcur.addr) ? mem[mcur.addr] : '0;
          if (mcur.we) begin mem[mcur.addr] = mcur.wdata; mwr_log.push_back(mcur.addr); end
        end
      end
      if (mreq.valid && mgnt) begin mcur = mreq; mpend = 2; end
    end
  end

  logic ev_shared_seen = 1'b0;
  always @(posedge clk) if (rst_n && ev.shared) ev_shared_seen <= 1'b1;

  // ---- snoop bus monitor
  addr_t notices [$];
  int    snoops;
  always @(posedge clk) if (rst_n && sn_out.start) begin
    if (phase == PH_COMMIT) notices.push_back(sn_out.addr);
    else snoops++;
  end

  // ---- CPU access: returns 1 if acknowledged within 40 cycles. A request
  //      that is not acknowledged (blocked) stays raised, as a CPU holds it;
  //      await_ack() continues it later. Friends answer `ans0`/`ans2` while
  //      the arbitrator snoops. `lat` is the number of clock edges from the
  //      request to the acknowledge.
  int   lat;
  task automatic await_ack(input snoop_rsp_e ans0, input snoop_rsp_e ans2,
                           output data_t rd, output logic acked);
    int n;
    acked = 0; n = 0; rd = '0;
    while (!acked && n < 40) begin
      #1;
      frsp[0] = sn_out.start ? ans0 : SN_INVALID;
      frsp[2] = sn_out.start ? ans2 : SN_INVALID;
      @(posedge clk); #1;
      n++;
      frsp[0] = SN_INVALID; frsp[2] = SN_INVALID;
      if (cpu_ack) begin
        acked = 1; rd = cpu_rdata;
        @(posedge clk); #1;          // the CPU takes the acknowledge
        cpu_req = 0;
      end
    end
    lat = n;
    @(negedge clk);
  endtask

  task automatic access(input logic we, input addr_t a, input data_t d,
                        input snoop_rsp_e ans0, input snoop_rsp_e ans2,
                        output data_t rd, output logic acked);
    @(negedge clk);
    cpu_req = 1; cpu_we = we; cpu_addr = a; cpu_wdata = d;
    await_ack(ans0, ans2, rd, acked);
  endtask

  // A friend's one-cycle snoop; returns this arbitrator's answer.
  task automatic friend_snoop(input int f, input logic we, input addr_t a,
                              output snoop_rsp_e ans);
    @(negedge clk);
    fsn[f] = '{start: 1'b1, we: we, addr: a};
    #1 ans = rsp_out[f];
    @(posedge clk); #1;
    fsn[f] = '0;
  endtask

  initial begin
    data_t rd;
    logic ok;
    snoop_rsp_e a;
    cpu_req = 0; cpu_we = 0; cpu_addr = '0; cpu_wdata = '0; ic_expired = 0;
    phase = PH_PARALLEL; serial_turn = 0; commit_go = 0;
    fsn[0] = '0; fsn[2] = '0; frsp[0] = SN_INVALID; frsp[2] = SN_INVALID;
    snoops = 0;
    mem[16'h0010] = 8'h11; mem[16'h0020] = 8'h22; mem[16'h0030] = 8'h33;
    mem[16'h0040] = 8'h44; mem[16'h0050] = 8'h55;
    mem[16'h0060] = 8'h66; mem[16'h0070] = 8'h77;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("not halted at start", !cpu_halt && !halted);

    // 1. read miss, no holder -> E/R/0, data from memory
    access(0, 16'h0010, 0, SN_MISS, SN_MISS, rd, ok);
    check("read miss acked", ok && rd == 8'h11 && lat == 4);
    check("one snoop", snoops == 1);
    // 2. local read hit, two-cycle latency
    access(0, 16'h0010, 0, SN_MISS, SN_MISS, rd, ok);
    check("read hit", ok && rd == 8'h11 && lat == 1);
    check("no snoop on hit", snoops == 1);
    // friend read of E/R/0 -> B, slot becomes S/R/0
    friend_snoop(0, 0, 16'h0010, a);
    check("friend read of E/R/0 answered B", a == SN_OK);
    // friend write of S/R/0 -> C
    friend_snoop(2, 1, 16'h0010, a);
    check("friend write of S/R/0 answered C", a == SN_DEFER);
    friend_snoop(2, 0, 16'h0999, a);
    check("friend snoop miss answered A", a == SN_MISS);

    // 3. write miss, no holder -> E/0/W, acknowledged without memory
    access(1, 16'h0020, 8'hA2, SN_MISS, SN_MISS, rd, ok);
    check("write miss acked", ok && lat == 1);
    // local read of E/0/W -> allowed, returns written data, tag E/R/W
    access(0, 16'h0020, 0, SN_MISS, SN_MISS, rd, ok);
    check("read own write", ok && rd == 8'hA2);
    friend_snoop(0, 0, 16'h0020, a);
    check("friend read of E/R/W answered C", a == SN_DEFER);
    friend_snoop(0, 1, 16'h0020, a);
    check("friend write of E/R/W answered C", a == SN_DEFER);

    // 4. write miss held by a friend (B) -> S/0/W
    access(1, 16'h0030, 8'hA3, SN_OK, SN_MISS, rd, ok);
    check("shared write acked", ok);
    friend_snoop(2, 1, 16'h0030, a);
    check("friend write of S/0/W answered B", a == SN_OK);
    // local write of S/0/W allowed
    access(1, 16'h0030, 8'hB3, SN_MISS, SN_MISS, rd, ok);
    check("local write of S/0/W", ok);

    // 4b. read miss held by a friend (B) -> S/R/0, data from memory
    access(0, 16'h0060, 0, SN_OK, SN_MISS, rd, ok);
    check("shared read acked", ok && rd == 8'h66 && ev_shared_seen);
    friend_snoop(2, 0, 16'h0060, a);
    check("friend read of S/R/0 answered B", a == SN_OK);
    friend_snoop(2, 1, 16'h0060, a);
    check("friend write of S/R/0 answered C", a == SN_DEFER);
    // 4c. local write of E/R/0 -> E/R/W
    access(0, 16'h0070, 0, SN_MISS, SN_MISS, rd, ok);
    check("read miss 0x70", ok && rd == 8'h77);
    friend_snoop(0, 1, 16'h0070, a);
    check("friend write of E/R/0 answered C", a == SN_DEFER);
    access(1, 16'h0070, 8'hF7, SN_MISS, SN_MISS, rd, ok);
    check("local write of E/R/0", ok && lat == 1);
    access(0, 16'h0070, 0, SN_MISS, SN_MISS, rd, ok);
    check("local read of E/R/W", ok && rd == 8'hF7);
    friend_snoop(0, 0, 16'h0070, a);
    check("friend read of E/R/W answered C", a == SN_DEFER);

    // 5. collision: friend 0 (lower) snoops the same address in the cycle
    //    the CPU misses; the arbitrator must wait
    @(negedge clk);
    fsn[0] = '{start: 1'b1, we: 1'b0, addr: 16'h0040};
    cpu_req = 1; cpu_we = 0; cpu_addr = 16'h0040;
    #1 check("collision: no start", !sn_out.start && ev.collide);
    @(posedge clk); #1;
    fsn[0] = '0;
    await_ack(SN_MISS, SN_MISS, rd, ok);
    check("access after collision", ok && rd == 8'h44);

    // 6. local read of S/0/W -> conflict, CPU blocked
    access(0, 16'h0030, 0, SN_MISS, SN_MISS, rd, ok);
    check("read of S/0/W blocked", !ok);
    check("blocked -> halted", halted && cpu_halt);

    // 7. commit: written slots 0x0020 (slot 1) and 0x0030 (slot 2) flushed
    //    in fill order with notices; read-only slot 0x0010 not written
    @(negedge clk);
    phase = PH_COMMIT;
    @(negedge clk);
    check("blocked cleared in commit", !halted);
    commit_go = 1;
    @(negedge clk);
    commit_go = 0;
    fork
      begin wait (commit_done); end
      begin repeat (100) @(posedge clk); end
    join_any
    disable fork;
    check("commit done", commit_done);
    check("three writes", mwr_log.size() == 3);
    if (mwr_log.size() == 3) check("write order", mwr_log[0] == 16'h0020 && mwr_log[1] == 16'h0030 && mwr_log[2] == 16'h0070);
    check("memory 0x70", mem[16'h0070] == 8'hF7);
    check("memory 0x60 untouched", mem[16'h0060] == 8'h66);
    check("memory 0x20", mem[16'h0020] == 8'hA2);
    check("memory 0x30", mem[16'h0030] == 8'hB3);
    check("memory 0x10 untouched", mem[16'h0010] == 8'h11);
    check("notices", notices.size() == 3 && notices[0] == 16'h0020 && notices[1] == 16'h0030 && notices[2] == 16'h0070);

    // 8. serial phase bypass
    @(negedge clk);
    phase = PH_SERIAL; serial_turn = 0;
    #1 check("halted outside own serial turn", cpu_halt);
    serial_turn = 1;
    #1 check("runs in own serial turn", !cpu_halt);
    await_ack(SN_MISS, SN_MISS, rd, ok);
    check("blocked read served in serial turn", ok && rd == 8'hB3);
    access(1, 16'h0050, 8'hC5, SN_MISS, SN_MISS, rd, ok);
    check("serial write acked", ok && mem[16'h0050] == 8'hC5);
    access(0, 16'h0030, 0, SN_MISS, SN_MISS, rd, ok);
    check("serial read from memory", ok && rd == 8'hB3);
    check("no snoop in serial", snoops == 6);
    serial_turn = 0;

    // 9. new parallel phase: buffer was cleared; overflow after DEPTH slots
    @(negedge clk);
    phase = PH_PARALLEL;
    for (int k = 0; k < DEPTH; k++) begin
      access(1, addr_t'(16'h0100 + k), data_t'(k), SN_MISS, SN_MISS, rd, ok);
      check("fill", ok);
    end
    access(1, 16'h0200, 8'h00, SN_MISS, SN_MISS, rd, ok);
    check("overflow blocks", !ok && halted);
    // friend commit notice erases an own slot
    @(negedge clk);
    phase = PH_COMMIT;
    fsn[0] = '{start: 1'b1, we: 1'b1, addr: 16'h0101};
    #1 check("erase on notice", ev.erased);
    @(posedge clk); #1;
    fsn[0] = '0;
    mwr_log.delete();
    @(negedge clk);
    commit_go = 1;
    @(negedge clk);
    commit_go = 0;
    wait (commit_done);
    @(posedge clk); #1;
    check("erased slot not flushed", mwr_log.size() == DEPTH - 1);
    @(negedge clk);
    phase = PH_SERIAL; serial_turn = 1;
    await_ack(SN_MISS, SN_MISS, rd, ok);
    check("overflowed write served in serial turn", ok && mem[16'h0200] == 8'h00);
    serial_turn = 0;

    // 10. instruction counter expiry halts
    @(negedge clk);
    phase = PH_PARALLEL; ic_expired = 1;
    #1 check("expired -> halted", halted && cpu_halt);
    ic_expired = 0;
    #1 check("running again", !halted && !cpu_halt);
    // 11. a friend answering C on a read miss blocks
    access(0, 16'h0300, 0, SN_MISS, SN_DEFER, rd, ok);
    check("friend C blocks", !ok && halted);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
