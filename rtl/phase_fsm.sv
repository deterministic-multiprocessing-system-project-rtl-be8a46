// phase_fsm: phase state machine of the deterministic multiprocessing system.
//
// The system cycles through three phases. PARALLEL: every CPU runs a time
// slice of `par_slice` instructions; the phase ends when every arbitrator
// reports `halted` (slice used up, communication detected or CAM buffer
// full). COMMIT: the arbitrators flush their written slots one after the
// other; `commit_go[i]` pulses for arbitrator i and the machine waits for its
// `commit_done[i]` before moving on. SERIAL: each CPU in turn runs alone for
// `ser_slice` instructions with `serial_turn[i]` high, its accesses going
// straight to main memory; the turn ends when that arbitrator reports
// `halted`. Then every instruction counter is reloaded and the next PARALLEL
// phase begins. A `ser_slice` of 0 skips the serial turns.
//
// Commit and serial turns follow a deterministic round-robin order: epoch e
// starts with CPU (e mod NCPU) and proceeds in increasing index. The three
// phases and the round-robin order are from the design description; the
// rotation of the first CPU from epoch to epoch and the handshakes are this
// design's choices.
//
// Timing: `ic_load` (with `ic_limit`) is a Mealy output asserted in the same
// cycle as the state change it belongs to, so the counters hold their new
// limit in the first cycle of the new phase or turn. After reset the machine
// loads every counter and enters PARALLEL in the next cycle.
module phase_fsm
  import dmp_pkg::*;
#(
  parameter int unsigned NCPU  = NCPU_DEF,
  parameter int unsigned CNT_W = dmp_pkg::CNT_W_DEF,
  localparam int unsigned CW   = (NCPU > 1) ? $clog2(NCPU) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] par_slice,
  input  logic [CNT_W-1:0] ser_slice,
  input  logic [NCPU-1:0]  halted,
  input  logic [NCPU-1:0]  commit_done,
  output phase_e           phase,
  output logic [NCPU-1:0]  commit_go,
  output logic [NCPU-1:0]  serial_turn,
  output logic [NCPU-1:0]  ic_load,
  output logic [CNT_W-1:0] ic_limit,
  output logic [31:0]      epoch          // completed parallel-commit-serial rounds
);

  typedef enum logic [2:0] {F_START, F_PAR, F_CGO, F_CWAIT, F_SER} fstate_e;

  fstate_e       st_q;
  logic [CW-1:0] first_q;   // first CPU of this epoch's round-robin
  logic [CW-1:0] cur_q;     // CPU whose commit or serial turn it is
  logic [CW:0]   done_q;    // turns finished in the current phase

  function automatic logic [CW-1:0] nxt(logic [CW-1:0] i);
    return (i == CW'(NCPU - 1)) ? '0 : i + 1'b1;
  endfunction

  // Mealy counter loads
  always_comb begin
    ic_load  = '0;
    ic_limit = par_slice;
    unique case (st_q)
      F_START: ic_load = '1;
      F_CWAIT: if (commit_done[cur_q] && done_q == (CW+1)'(NCPU - 1)) begin
        ic_load[first_q] = 1'b1;
        ic_limit         = ser_slice;
      end
      F_SER: if (halted[cur_q]) begin
        if (done_q == (CW+1)'(NCPU - 1)) begin
          ic_load = '1;
        end else begin
          ic_load[nxt(cur_q)] = 1'b1;
          ic_limit            = ser_slice;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= F_START;
      first_q <= '0;
      cur_q   <= '0;
      done_q  <= '0;
      epoch   <= '0;
    end else begin
      unique case (st_q)
        F_START: st_q <= F_PAR;
        F_PAR: if (&halted) begin
          cur_q  <= first_q;
          done_q <= '0;
          st_q   <= F_CGO;
        end
        F_CGO: st_q <= F_CWAIT;
        F_CWAIT: if (commit_done[cur_q]) begin
          if (done_q == (CW+1)'(NCPU - 1)) begin
            cur_q  <= first_q;
            done_q <= '0;
            st_q   <= F_SER;
          end else begin
            cur_q  <= nxt(cur_q);
            done_q <= done_q + 1'b1;
            st_q   <= F_CGO;
          end
        end
        F_SER: if (halted[cur_q]) begin
          if (done_q == (CW+1)'(NCPU - 1)) begin
            first_q <= nxt(first_q);
            epoch   <= epoch + 1'b1;
            st_q    <= F_PAR;
          end else begin
            cur_q  <= nxt(cur_q);
            done_q <= done_q + 1'b1;
          end
        end
        default: st_q <= F_START;
      endcase
    end
  end

  always_comb begin
    unique case (st_q)
      F_CGO, F_CWAIT: phase = PH_COMMIT;
      F_SER:          phase = PH_SERIAL;
      default:        phase = PH_PARALLEL;
    endcase
  end

  always_comb begin
    commit_go   = '0;
    serial_turn = '0;
    if (st_q == F_CGO) commit_go[cur_q]   = 1'b1;
    if (st_q == F_SER) serial_turn[cur_q] = 1'b1;
  end

endmodule
