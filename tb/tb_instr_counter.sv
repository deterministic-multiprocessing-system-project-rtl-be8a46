// tb_instr_counter: self-checking test of the programmable instruction
// counter. Random retire pulses are compared cycle by cycle with a
// reference count; loads of random limits (0 included) start new slices,
// and a load and a retire in the same cycle must leave the count at zero.
// `expired` must already be high during the retire that reaches the limit.
module tb_instr_counter;
  localparam int unsigned CNT_W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load, retire;
  logic [CNT_W-1:0] limit, count;
  logic expired;
  int checks = 0, failures = 0;

  instr_counter #(.CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_cnt, ref_lim, expired_seen;

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: count=%0d ref=%0d limit=%0d expired=%0b", what, count, ref_cnt, ref_lim, expired);
    end
  endtask

  initial begin
    load = 0; retire = 0; limit = '0;
    ref_cnt = 0; ref_lim = 0; expired_seen = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("reset expired", expired == 1'b1);
    for (int s = 0; s < 200; s++) begin
      // new slice
      @(negedge clk);
      load  = 1;
      limit = (s % 17 == 0) ? '0 : CNT_W'($urandom_range(1, 40));
      retire = $urandom_range(0, 1);       // load must win
      @(posedge clk); #1;
      ref_cnt = 0; ref_lim = int'(limit);
      load = 0; retire = 0;
      #1 check("after load", count == '0 && expired == (ref_lim == 0));
      for (int c = 0; c < 60; c++) begin
        @(negedge clk);
        retire = ($urandom_range(0, 2) != 0);
        #1 check("expired look-ahead",
                 expired == (ref_cnt >= ref_lim || (retire && ref_cnt + 1 == ref_lim)));
        @(posedge clk); #1;
        if (retire && ref_cnt < ref_lim) ref_cnt++;
        retire = 0;
        #1 check("count", int'(count) == ref_cnt);
        check("expired", expired == (ref_cnt >= ref_lim));
        if (expired) expired_seen++;
      end
    end
    check("slices expired", expired_seen > 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
