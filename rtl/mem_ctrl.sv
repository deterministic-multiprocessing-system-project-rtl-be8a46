// mem_ctrl: main memory controller shared by all arbitrators.
//
// Every arbitrator has one request port (`req[i]`, held until `gnt[i]`).
// A round-robin picker admits at most one request per cycle into a request
// queue of QDEPTH entries; the search for the next requester starts just
// after the one admitted last, so no arbitrator can be passed over more than
// NCPU-1 times. The queue is served strictly in arrival order, one access per
// cycle, against a synchronous memory with a one-cycle read latency
// (`mem_*`). When an access completes, `rsp[i].done` pulses for the
// requester that issued it, with the read data for a read.
//
// The request queue, its limited size, the arrival-order service and the
// fairness between arbitrators follow the design description; the queue
// depth of 4, the round-robin picker and the port handshake are this
// design's choices. The pipelined commit-phase mode that the description
// mentions as a possibility is not implemented.
//
// Timing: a request admitted in cycle t is issued to memory at t+1 at the
// earliest and completes (`done`) at t+2.
module mem_ctrl
  import dmp_pkg::*;
#(
  parameter int unsigned NCPU   = NCPU_DEF,
  parameter int unsigned QDEPTH = 4,
  localparam int unsigned CW    = (NCPU > 1) ? $clog2(NCPU) : 1,
  localparam int unsigned QW    = (QDEPTH > 1) ? $clog2(QDEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  mem_req_t        req  [NCPU],
  output logic [NCPU-1:0] gnt,
  output mem_rsp_t        rsp  [NCPU],
  // synchronous memory port
  output logic            mem_en,
  output logic            mem_we,
  output addr_t           mem_addr,
  output data_t           mem_wdata,
  input  data_t           mem_rdata,
  // observation
  output logic [QW:0]     q_count
);

  typedef struct packed {
    logic [CW-1:0] id;
    logic          we;
    addr_t         addr;
    data_t         wdata;
  } qent_t;

  qent_t         q_mem [QDEPTH];
  logic [QW-1:0] wr_ptr_q, rd_ptr_q;
  logic [QW:0]   cnt_q;
  logic [CW-1:0] rr_q;          // first requester to look at
  logic          p_valid_q;     // access issued last cycle
  logic [CW-1:0] p_id_q;

  logic          pick_valid;
  logic [CW-1:0] pick_id;
  logic          push, pop;

  // Round-robin pick among the valid requests.
  always_comb begin
    pick_valid = 1'b0;
    pick_id    = '0;
    for (int unsigned k = 0; k < NCPU; k++) begin
      int unsigned c;
      c = (int'(rr_q) + k) % NCPU;
      if (!pick_valid && req[c].valid) begin
        pick_valid = 1'b1;
        pick_id    = CW'(c);
      end
    end
  end

  assign push = pick_valid && (cnt_q != (QW+1)'(QDEPTH));
  assign pop  = (cnt_q != '0);

  always_comb begin
    gnt = '0;
    if (push) gnt[pick_id] = 1'b1;
  end

  assign mem_en    = pop;
  assign mem_we    = q_mem[rd_ptr_q].we;
  assign mem_addr  = q_mem[rd_ptr_q].addr;
  assign mem_wdata = q_mem[rd_ptr_q].wdata;
  assign q_count   = cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr_q  <= '0;
      rd_ptr_q  <= '0;
      cnt_q     <= '0;
      rr_q      <= '0;
      p_valid_q <= 1'b0;
      p_id_q    <= '0;
      for (int unsigned k = 0; k < QDEPTH; k++) q_mem[k] <= '0;
    end else begin
      if (push) begin
        q_mem[wr_ptr_q] <= '{id: pick_id, we: req[pick_id].we,
                             addr: req[pick_id].addr, wdata: req[pick_id].wdata};
        wr_ptr_q <= (wr_ptr_q == QW'(QDEPTH - 1)) ? '0 : wr_ptr_q + 1'b1;
        rr_q     <= (pick_id == CW'(NCPU - 1)) ? '0 : pick_id + 1'b1;
      end
      if (pop) rd_ptr_q <= (rd_ptr_q == QW'(QDEPTH - 1)) ? '0 : rd_ptr_q + 1'b1;
      cnt_q     <= cnt_q + (QW+1)'(push) - (QW+1)'(pop);
      p_valid_q <= pop;
      p_id_q    <= q_mem[rd_ptr_q].id;
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < NCPU; i++) begin
      rsp[i].done  = p_valid_q && (p_id_q == CW'(i));
      rsp[i].rdata = mem_rdata;
    end
  end

  a_gnt_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 cnt_q <= (QW+1)'(QDEPTH));

endmodule
