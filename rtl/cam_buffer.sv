// cam_buffer: per-CPU content addressable buffer of the deterministic
// multiprocessing system.
//
// Every slot holds the address a CPU touched in the current parallel phase,
// the data at that address after the CPU's latest access, and the three tag
// bits E/S, R and W. Slots are searched in parallel by address: one local
// port for the owning arbitrator and NSN snoop ports, one per arbitrator in
// the system, so that every friend's snoop can be answered in the same cycle.
//
// Slots are filled in order from slot 0 through a fill pointer and are not
// reused until `clear` empties the whole buffer at the end of the owner's
// commit. Slot order is therefore the order in which addresses were first
// touched, which the commit walk uses as its chronological order; a free slot
// left behind by an erase is not recycled. `full` is high when the fill
// pointer has reached DEPTH, which the arbitrator reports as an overflow.
//
// Writes per cycle: one allocation or one update from the owner, one read
// port for the commit walk (`rd_idx`), and per snoop port a `share` (clear
// the E bit of the matching slot) and an `erase` (invalidate it). When an
// owner update and a snoop-side change hit the same slot in one cycle (the
// arbitrator allows this only for the data fill of a pending read), the
// snoop-side change is applied last, so a friend's share is never lost.
// All lookups are combinational; all changes take effect at the clock edge.
// The slot contents follow the design description; the port set, the
// append-only fill and the default depth of 16 are this design's choices.
module cam_buffer
  import dmp_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned NSN   = NCPU_DEF,
  localparam int unsigned IW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // local lookup
  input  addr_t           lk_addr,
  output logic            lk_hit,
  output logic [IW-1:0]   lk_idx,
  output tag_t            lk_tag,
  output data_t           lk_data,
  // allocation of a new slot at the fill pointer
  input  logic            alloc,
  input  addr_t           alloc_addr,
  input  data_t           alloc_data,
  input  tag_t            alloc_tag,
  output logic [IW-1:0]   alloc_idx,   // slot the next allocation takes
  output logic            full,
  // update of an existing slot by the owner
  input  logic            upd,
  input  logic [IW-1:0]   upd_idx,
  input  tag_t            upd_tag,
  input  logic            upd_data_en,
  input  data_t           upd_data,
  input  logic            inv,         // mark one slot empty
  input  logic [IW-1:0]   inv_idx,
  // commit walk read port
  input  logic [IW-1:0]   rd_idx,
  output logic            rd_valid,
  output addr_t           rd_addr,
  output data_t           rd_data,
  output tag_t            rd_tag,
  // snoop ports
  input  addr_t           sn_addr  [NSN],
  output logic            sn_hit   [NSN],
  output tag_t            sn_tag   [NSN],
  input  logic            sn_share [NSN],
  input  logic            sn_erase [NSN],
  // empty the whole buffer
  input  logic            clear
);

  logic             valid_q [DEPTH];
  addr_t            addr_q  [DEPTH];
  data_t            data_q  [DEPTH];
  tag_t             tag_q   [DEPTH];
  logic [IW:0]      fill_q;
  logic [IW-1:0]    sn_idx  [NSN];

  assign full      = (fill_q == (IW+1)'(DEPTH));
  assign alloc_idx = fill_q[IW-1:0];

  // Local search. Addresses are unique among valid slots, so a priority
  // search returns the only match.
  always_comb begin
    lk_hit  = 1'b0;
    lk_idx  = '0;
    for (int unsigned k = 0; k < DEPTH; k++) begin
      if (!lk_hit && valid_q[k] && addr_q[k] == lk_addr) begin
        lk_hit = 1'b1;
        lk_idx = IW'(k);
      end
    end
    lk_tag  = tag_q[lk_idx];
    lk_data = data_q[lk_idx];
  end

  // Snoop searches.
  always_comb begin
    for (int unsigned p = 0; p < NSN; p++) begin
      sn_hit[p] = 1'b0;
      sn_idx[p] = '0;
      for (int unsigned k = 0; k < DEPTH; k++) begin
        if (!sn_hit[p] && valid_q[k] && addr_q[k] == sn_addr[p]) begin
          sn_hit[p] = 1'b1;
          sn_idx[p] = IW'(k);
        end
      end
      sn_tag[p] = tag_q[sn_idx[p]];
    end
  end

  assign rd_valid = valid_q[rd_idx];
  assign rd_addr  = addr_q[rd_idx];
  assign rd_data  = data_q[rd_idx];
  assign rd_tag   = tag_q[rd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill_q <= '0;
      for (int unsigned k = 0; k < DEPTH; k++) begin
        valid_q[k] <= 1'b0;
        addr_q[k]  <= '0;
        data_q[k]  <= '0;
        tag_q[k]   <= '0;
      end
    end else if (clear) begin
      fill_q <= '0;
      for (int unsigned k = 0; k < DEPTH; k++) valid_q[k] <= 1'b0;
    end else begin
      if (alloc && !full) begin
        valid_q[alloc_idx] <= 1'b1;
        addr_q[alloc_idx]  <= alloc_addr;
        data_q[alloc_idx]  <= alloc_data;
        tag_q[alloc_idx]   <= alloc_tag;
        fill_q             <= fill_q + 1'b1;
      end
      if (upd) begin
        tag_q[upd_idx] <= upd_tag;
        if (upd_data_en) data_q[upd_idx] <= upd_data;
      end
      if (inv) valid_q[inv_idx] <= 1'b0;
      for (int unsigned p = 0; p < NSN; p++) begin
        if (sn_hit[p] && sn_share[p]) tag_q[sn_idx[p]].excl <= 1'b0;
        if (sn_hit[p] && sn_erase[p]) valid_q[sn_idx[p]] <= 1'b0;
      end
    end
  end

endmodule
