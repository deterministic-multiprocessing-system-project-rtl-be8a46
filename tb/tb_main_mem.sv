// tb_main_mem: self-checking test of the dual-port main memory. Random
// reads and writes on port A and random reads on port B are checked
// against a reference array: one-cycle read latency on both ports, old data
// returned by a port-A write (read-first), data held while a port is idle,
// and zero contents after power-up.
module tb_main_mem;
  import dmp_pkg::*;
  localparam int unsigned AW = 16;

  logic clk = 1'b0;
  logic a_en, a_we, b_en;
  logic [AW-1:0] a_addr, b_addr;
  data_t a_wdata, a_rdata, b_rdata;
  int checks = 0, failures = 0;

  main_mem #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  data_t ref_mem [logic [AW-1:0]];
  function automatic data_t rd(logic [AW-1:0] a);
    return ref_mem.exists(a) ? ref_mem[a] : '0;
  endfunction

  initial begin
    data_t exp_a, exp_b;
    a_en = 0; a_we = 0; b_en = 0; a_addr = '0; b_addr = '0; a_wdata = '0;
    exp_a = '0; exp_b = '0;
    // power-up contents
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      a_en = 1; a_addr = AW'($urandom); b_en = 1; b_addr = AW'($urandom);
      @(posedge clk); #1;
      check("zero A", a_rdata == '0);
      check("zero B", b_rdata == '0);
    end
    for (int cyc = 0; cyc < 30000; cyc++) begin
      @(negedge clk);
      a_en = $urandom_range(0, 3) != 0;
      a_we = $urandom_range(0, 1);
      a_addr = AW'($urandom_range(0, 63)) + ((cyc % 2) ? AW'(16'hff00) : '0);
      a_wdata = data_t'($urandom);
      b_en = $urandom_range(0, 3) != 0;
      b_addr = AW'($urandom_range(0, 63)) + ((cyc % 3 == 0) ? AW'(16'hff00) : '0);
      if (a_en) exp_a = rd(a_addr);
      if (b_en) exp_b = rd(b_addr);
      @(posedge clk); #1;
      if (a_en && a_we) ref_mem[a_addr] = a_wdata;
      check("port A", a_rdata == exp_a);
      check("port B", b_rdata == exp_b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
