// cpu_model: behavioural stand-in for one processor of the deterministic
// multiprocessing system (not synthesizable; testbench use only).
//
// It runs a small fixed program chosen by ID, made of NOPs, loads that
// compare the loaded byte with an expected value, stores of a constant and
// stores of the last loaded byte plus a constant. It follows the processor
// side of the memory interface: it starts an instruction only on a clock
// edge where `halt` is low, holds a load or store request until `ack`, and
// pulses `retire` for one cycle after every completed instruction. With
// STALL_PCT > 0 it idles on a random share of the cycles in which it could
// start an instruction, which stands for a slower or irregular processor.
// After the program it executes NOPs forever and raises `done`.
// With RANDOM_OPS > 0 the program is instead a random mix of that many
// loads, stores and NOPs over a pool of eight shared addresses; its loads
// are not compared (the testbench checks them), and `ld_*` outputs report
// each completed load.
module cpu_model
  import dmp_pkg::*;
#(
  parameter int unsigned ID        = 0,
  parameter int unsigned STALL_PCT = 0,
  parameter int unsigned RANDOM_OPS = 0     // >0: a random program of this length
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  halt,
  input  logic  ack,
  input  data_t rdata,
  output logic  req,
  output logic  we,
  output addr_t addr,
  output data_t wdata,
  output logic  retire,
  output logic  done,
  output logic  ld_done,    // a load completed in this cycle's edge
  output addr_t ld_addr,
  output data_t ld_data
);

  typedef enum logic [1:0] {OP_NOP, OP_LD, OP_ST, OP_STINC} opk_e;
  typedef struct {
    opk_e  k;
    addr_t a;
    data_t d;   // store value, expected load value, or increment
  } op_t;

  op_t   prog [$];
  data_t last_ld;
  int    pc;
  int    errors;          // loads that returned an unexpected value
  data_t trace [$];       // every loaded byte, in program order
  logic  busy;

  localparam addr_t PRIV = addr_t'(16'h1000 * (ID + 1));

  function automatic void add(opk_e k, addr_t a, data_t d);
    op_t o;
    o.k = k; o.a = a; o.d = d;
    prog.push_back(o);
  endfunction

  function automatic void nops(int n);
    for (int k = 0; k < n; k++) add(OP_NOP, '0, '0);
  endfunction

  // The programs. See tb_dmp_top for what each part exercises.
  initial begin
    if (RANDOM_OPS > 0) begin
      for (int n = 0; n < int'(RANDOM_OPS); n++) begin
        int r;
        r = $urandom_range(0, 9);
        if (r < 4)      add(OP_LD, addr_t'(16'h0400 + $urandom_range(0, 7)), '0);
        else if (r < 6) add(OP_ST, addr_t'(16'h0400 + $urandom_range(0, 7)), data_t'($urandom));
        else if (r < 8) add(OP_STINC, addr_t'(16'h0400 + $urandom_range(0, 7)), data_t'(ID + 1));
        else            add(OP_NOP, '0, '0);
      end
    end else
    unique case (ID)
      0: begin
        add(OP_ST, 16'h0500, 8'hA0);              // contended shared store
        add(OP_ST, 16'h0600, 8'h5A);              // message for CPU1
        add(OP_ST, 16'h8000, 8'hE3);              // top-left pixel
        for (int k = 0; k < 8; k++) add(OP_ST, PRIV + addr_t'(k), data_t'(8'h10 + k));
        for (int k = 0; k < 8; k++) add(OP_LD, PRIV + addr_t'(k), data_t'(8'h10 + k));
        add(OP_LD, 16'h0700, 8'h00);              // shared read
        nops(60);
        add(OP_LD, 16'h0500, 8'hA0);
        add(OP_LD, 16'h0601, 8'h5B);
      end
      1: begin
        add(OP_ST, 16'h0500, 8'hA1);
        nops(4);
        add(OP_LD, 16'h0700, 8'h00);              // shared read
        nops(21);
        add(OP_LD, 16'h0600, 8'h5A);              // conflicts with CPU0's store
        add(OP_STINC, 16'h0601, 8'h01);
        for (int k = 0; k < 8; k++) add(OP_ST, PRIV + addr_t'(k), data_t'(8'h20 + k));
        for (int k = 0; k < 8; k++) add(OP_LD, PRIV + addr_t'(k), data_t'(8'h20 + k));
        nops(60);
        add(OP_LD, 16'h0500, 8'hA0);
      end
      default: begin
        add(OP_ST, 16'h0500, data_t'(8'hA0 + ID));
        for (int k = 0; k < 20; k++) add(OP_ST, PRIV + addr_t'(k), data_t'(8'h30 + k)); // overflows
        add(OP_LD, 16'h0700, 8'h00);
        nops(60);
        for (int k = 0; k < 20; k++) add(OP_LD, PRIV + addr_t'(k), data_t'(8'h30 + k));
        add(OP_LD, 16'h0601, 8'h5B);
      end
    endcase
  end

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req <= 0; we <= 0; addr <= '0; wdata <= '0; retire <= 0; done <= 0;
      pc <= 0; busy <= 0; last_ld <= '0; errors <= 0;
      ld_done <= 0; ld_addr <= '0; ld_data <= '0;
      trace.delete();
    end else begin
      retire <= 0;
      ld_done <= 0;
      if (busy) begin
        if (ack) begin
          req  <= 0;
          busy <= 0;
          retire <= 1;
          if (prog[pc].k == OP_LD) begin
            last_ld <= rdata;
            trace.push_back(rdata);
            ld_done <= 1; ld_addr <= prog[pc].a; ld_data <= rdata;
            if (RANDOM_OPS == 0 && rdata != prog[pc].d) begin
              errors <= errors + 1;
              $display("CPU%0d: load of %h returned %h, expected %h", ID, prog[pc].a, rdata, prog[pc].d);
            end
          end
          pc <= pc + 1;
        end
      end else if (!halt && !(STALL_PCT > 0 && $urandom_range(0, 99) < STALL_PCT)) begin
        if (pc >= prog.size() || prog[pc].k == OP_NOP) begin
          retire <= 1;
          if (pc < prog.size()) pc <= pc + 1;
        end else begin
          req   <= 1;
          busy  <= 1;
          we    <= (prog[pc].k != OP_LD);
          addr  <= prog[pc].a;
          wdata <= (prog[pc].k == OP_STINC) ? last_ld + prog[pc].d : prog[pc].d;
        end
      end
      done <= (pc >= prog.size());
    end
  end

endmodule
