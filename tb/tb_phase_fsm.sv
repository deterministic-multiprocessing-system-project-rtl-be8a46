// tb_phase_fsm: self-checking test of the phase state machine with NCPU=3
// arbitrator stand-ins in the testbench. Each stand-in reports `halted` at a
// random time in the parallel phase, answers `commit_go` with `commit_done`
// after a random delay, and ends its serial turn at a random time after the
// turn starts. Checked over many epochs: the commit and serial turns of
// epoch e run in the order e mod 3, e+1 mod 3, e+2 mod 3, one at a time; the
// commit starts only after all arbitrators halted; every counter is loaded
// with par_slice when a parallel phase starts and the turn's counter with
// ser_slice when its serial turn starts; the epoch count advances once per
// round.
module tb_phase_fsm;
  import dmp_pkg::*;
  localparam int unsigned NCPU = 3, CNT_W = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [CNT_W-1:0] par_slice, ser_slice, ic_limit;
  logic [NCPU-1:0] halted, commit_done, commit_go, serial_turn, ic_load;
  phase_e phase;
  logic [31:0] epoch;
  int checks = 0, failures = 0;

  phase_fsm #(.NCPU(NCPU), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // stand-in arbitrators
  int par_delay [NCPU];
  int cdelay [NCPU];
  int sdelay;
  logic prev_ser [NCPU];
  phase_e prev_phase;

  // scoreboard
  int exp_epoch, commit_seq, serial_seq, n_epochs;

  always @(posedge clk) if (rst_n) begin
    // ---- observe outputs of this cycle
    check("go one-hot", $onehot0(commit_go));
    check("turn one-hot", $onehot0(serial_turn));
    if (commit_go != '0) begin
      check("go in commit", phase == PH_COMMIT);
      check("go order", commit_go[(exp_epoch + commit_seq) % NCPU]);
      check("all halted before commit", commit_seq != 0 || &halted);
      commit_seq++;
    end
    for (int i = 0; i < NCPU; i++) begin
      if (serial_turn[i] && !prev_ser[i]) begin
        check("turn order", i == (exp_epoch + serial_seq) % NCPU);
        serial_seq++;
      end
      prev_ser[i] = serial_turn[i];
    end
    if (ic_load != '0) begin
      if (&ic_load) check("par load value", ic_limit == par_slice);
      else begin
        check("ser load value", ic_limit == ser_slice);
        check("ser load target", $onehot(ic_load));
      end
    end
    if (prev_phase == PH_SERIAL && phase == PH_PARALLEL) begin
      check("all turns", serial_seq == NCPU && commit_seq == NCPU);
      exp_epoch++; commit_seq = 0; serial_seq = 0; n_epochs++;
    end
    if (prev_phase == PH_PARALLEL && phase == PH_SERIAL) check("no skipped commit", 0);
    prev_phase = phase;
  end

  // stand-in behaviour (drives inputs after the edge)
  always @(posedge clk) begin
    #1;
    if (!rst_n) begin
      halted = '0; commit_done = '0;
    end else begin
      commit_done = '0;
      for (int i = 0; i < NCPU; i++) begin
        if (ic_load[i]) begin
          halted[i] = 0;
          par_delay[i] = &ic_load ? $urandom_range(0, 12) : $urandom_range(0, 6);
        end else if (par_delay[i] > 0) par_delay[i]--;
        else halted[i] = 1;
        if (commit_go[i]) cdelay[i] = $urandom_range(1, 6);
        else if (cdelay[i] > 0) begin
          cdelay[i]--;
          if (cdelay[i] == 0) commit_done[i] = 1;
        end
      end
    end
  end

  initial begin
    par_slice = 16'd100; ser_slice = 16'd5;
    halted = '0; commit_done = '0;
    for (int i = 0; i < NCPU; i++) begin par_delay[i] = 0; cdelay[i] = 0; prev_ser[i] = 0; end
    exp_epoch = 0; commit_seq = 0; serial_seq = 0; n_epochs = 0; prev_phase = PH_PARALLEL;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (n_epochs == 200);
    @(posedge clk); #2;
    check("epoch counter", epoch == 32'(n_epochs));
    $display("epochs=%0d", n_epochs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
