// instr_counter: programmable instruction counter attached to one CPU.
//
// The CPU pulses `retire` once for every instruction it completes. A `load`
// pulse clears the count and latches a new `limit`; `expired` is high once
// `limit` instructions have retired since the load (at once for a limit of
// 0). The count saturates at the limit, so a CPU that keeps pulsing `retire`
// while it should be halted cannot wrap the counter. The arbitrator uses
// `expired` as the end of the CPU's time slice and the phase state machine
// uses it to end a serial turn. Counting instructions rather than cycles is
// what makes the slice boundaries deterministic; the width, the saturation
// and the load-clears-count behaviour are choices of this implementation.
//
// Timing: `expired` already rises in the cycle of the retire pulse that
// reaches the limit (the count itself follows at the clock edge), so a CPU
// that samples its halt input at that edge never runs past its slice. `load`
// wins over a simultaneous `retire`, which then counts in the old slice;
// `expired` describes the old slice in the load cycle. Reset leaves the counter expired (limit 0).
module instr_counter #(
  parameter int unsigned CNT_W = dmp_pkg::CNT_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,     // start a new slice
  input  logic [CNT_W-1:0] limit,    // instructions in the new slice
  input  logic             retire,   // one instruction completed
  output logic [CNT_W-1:0] count,    // instructions retired in this slice
  output logic             expired   // count has reached the limit
);

  logic [CNT_W-1:0] limit_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      limit_q <= '0;
    end else if (load) begin
      count   <= '0;
      limit_q <= limit;
    end else if (retire && count < limit_q) begin
      count <= count + 1'b1;
    end
  end

  assign expired = (count >= limit_q) ||
                   (retire && (count + 1'b1 == limit_q));

endmodule
