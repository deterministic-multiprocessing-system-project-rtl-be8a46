// arbitrator: per-CPU memory-access controller of the deterministic
// multiprocessing system. It owns the CPU's CAM buffer (instantiated here).
//
// Parallel phase. A CPU access is first looked up in the local CAM buffer.
// On a local hit the "valid tags" column of the read/write tables decides:
// read allowed on E/?/? or S/R/0 (E slots gain R), write allowed on E/?/? or
// S/0/W (E slots gain W, the data is replaced). On a local miss the
// arbitrator raises `start` on its own snoop bus (address, start,
// read/write) and every friend answers in the same cycle with a two-bit code:
// MISS (A), OK (B, the friend's slot loses E) or DEFER (C). No holder: a
// slot is taken E/R/0 (read, data fetched from main memory) or E/0/W (write).
// Holders that all answer B: the slot is taken S/R/0 or S/0/W. Any C, a
// disallowed local hit, or a full CAM buffer halts the CPU with its access
// left pending until the commit phase ("blocked").
//
// Commit phase. On `commit_go` the arbitrator walks its slots in fill order;
// every valid written slot is written to main memory, then its address is
// announced on the snoop bus (friends erase their copy) and the slot is
// emptied. Finally the whole buffer is cleared and `commit_done` pulses.
//
// Serial phase. While `serial_turn` is high the CAM buffer is bypassed:
// accesses go straight to main memory.
//
// Races are resolved structurally: when two arbitrators snoop the same
// address in one cycle the lower-numbered one goes first and the other
// waits; a local hit waits while any friend snoops the same address, so a
// tag never takes an owner change and a friend change in the same cycle
// (the data fill of a pending read writes back the slot's current tag, and
// the buffer applies a simultaneous friend share after it).
// These rules, the data source of a shared read (main memory: a slot that
// was never written is equal to it), the absence of a fetch on a write miss
// (a slot holds one whole data word) and the handshakes are this design's
// own choices; the tables, the snoop answers and the commit steps follow the
// design description.
//
// Timing: a local hit or a write miss is decided in the cycle the request
// is taken and acknowledged (`cpu_ack`, high for one cycle, with `cpu_rdata`)
// in the next cycle; a read miss and a serial-phase access wait for main
// memory (four cycles from request to acknowledge with an idle controller). The CPU must hold its request
// until `cpu_ack` and must not start an instruction while `cpu_halt` is high.
module arbitrator
  import dmp_pkg::*;
#(
  parameter int unsigned NCPU  = NCPU_DEF,
  parameter int unsigned ID    = 0,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned IW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic       clk,
  input  logic       rst_n,
  // CPU side
  input  logic       cpu_req,
  input  logic       cpu_we,
  input  addr_t      cpu_addr,
  input  data_t      cpu_wdata,
  output logic       cpu_ack,
  output data_t      cpu_rdata,
  output logic       cpu_halt,
  input  logic       ic_expired,     // instruction counter: slice used up
  // phase state machine
  input  phase_e     phase,
  input  logic       serial_turn,
  input  logic       commit_go,      // pulse: flush now
  output logic       commit_done,    // pulse: flush finished, buffer cleared
  output logic       halted,         // idle and expired or blocked
  // snoop interconnect (entry ID of each array is this arbitrator's own)
  output snoop_req_t sn_out,
  input  snoop_req_t sn_in  [NCPU],
  output snoop_rsp_e rsp_out[NCPU],  // this arbitrator's answer to each requester
  input  snoop_rsp_e rsp_in [NCPU],  // each friend's answer to this arbitrator
  // memory controller
  output mem_req_t   mreq,
  input  logic       mgnt,
  input  mem_rsp_t   mrsp,
  // observation
  output arb_ev_t    ev
);

  typedef enum logic [2:0] {
    A_IDLE, A_RESP, A_FETCH, A_BYPASS, A_CWALK, A_CWR, A_CCLR
  } astate_e;

  astate_e       state_q;
  logic          blocked_q;
  logic          issued_q;       // memory request accepted by the controller
  logic [IW-1:0] idx_q;          // fetch slot or commit walk position
  data_t         rdata_q;

  // CAM buffer connections
  logic          lk_hit, full, rd_valid, alloc, upd, upd_data_en, inv, clear;
  logic [IW-1:0] lk_idx, alloc_idx, rd_idx, idx_sel;
  tag_t          lk_tag, rd_tag, alloc_tag, upd_tag;
  data_t         lk_data, rd_data, alloc_data, upd_data;
  addr_t         rd_addr;
  addr_t         sn_addr  [NCPU];
  logic          sn_hit   [NCPU];
  tag_t          sn_tag   [NCPU];
  logic          sn_share [NCPU];
  logic          sn_erase [NCPU];

  cam_buffer #(.DEPTH(DEPTH), .NSN(NCPU)) u_cam (
    .clk, .rst_n,
    .lk_addr(cpu_addr), .lk_hit, .lk_idx, .lk_tag, .lk_data,
    .alloc, .alloc_addr(cpu_addr), .alloc_data, .alloc_tag, .alloc_idx, .full,
    .upd, .upd_idx(idx_sel), .upd_tag, .upd_data_en, .upd_data,
    .inv, .inv_idx(idx_q),
    .rd_idx, .rd_valid, .rd_addr, .rd_data, .rd_tag,
    .sn_addr, .sn_hit, .sn_tag, .sn_share, .sn_erase,
    .clear
  );

  // ---------------------------------------------------------------- friends
  // Answers to the other arbitrators' snoops, and commit notices.
  always_comb begin
    for (int unsigned j = 0; j < NCPU; j++) begin
      sn_addr[j]  = sn_in[j].addr;
      rsp_out[j]  = SN_INVALID;
      sn_share[j] = 1'b0;
      sn_erase[j] = 1'b0;
      if (j != ID && sn_in[j].start) begin
        if (phase == PH_PARALLEL) begin
          if (!sn_hit[j]) begin
            rsp_out[j] = SN_MISS;
          end else if (sn_in[j].we ? friend_write_ok(sn_tag[j])
                                   : friend_read_ok(sn_tag[j])) begin
            rsp_out[j]  = SN_OK;
            sn_share[j] = 1'b1;
          end else begin
            rsp_out[j] = SN_DEFER;
          end
        end else if (phase == PH_COMMIT) begin
          sn_erase[j] = sn_hit[j];
        end
      end
    end
  end

  // ------------------------------------------------------------ own access
  logic take;           // a parallel-phase access may be decided this cycle
  logic same_any;       // a friend snoops the CPU's address this cycle
  logic same_lower;     // a lower-numbered friend snoops the CPU's address
  logic any_ok, any_defer;

  always_comb begin
    same_any   = 1'b0;
    same_lower = 1'b0;
    any_ok     = 1'b0;
    any_defer  = 1'b0;
    for (int unsigned j = 0; j < NCPU; j++) begin
      if (j != ID && sn_in[j].start && sn_in[j].addr == cpu_addr) begin
        same_any = 1'b1;
        if (j < ID) same_lower = 1'b1;
      end
      if (j != ID) begin
        if (rsp_in[j] == SN_OK)    any_ok    = 1'b1;
        if (rsp_in[j] == SN_DEFER) any_defer = 1'b1;
      end
    end
  end

  assign take = (state_q == A_IDLE) && (phase == PH_PARALLEL) && cpu_req &&
                !ic_expired && !blocked_q;

  logic hit_go, hit_ok, snoop_go;
  assign hit_go   = take && lk_hit && !same_any;
  assign hit_ok   = cpu_we ? local_write_ok(lk_tag) : local_read_ok(lk_tag);
  assign snoop_go = take && !lk_hit && !full && !same_lower;

  assign sn_out.start = snoop_go || (state_q == A_CWR && issued_q && mrsp.done);
  assign sn_out.we    = (state_q == A_CWR) ? 1'b1 : cpu_we;
  assign sn_out.addr  = (state_q == A_CWR) ? rd_addr : cpu_addr;

  // CAM buffer controls
  assign rd_idx  = idx_q;
  assign idx_sel = (state_q == A_FETCH) ? idx_q : lk_idx;

  always_comb begin
    alloc       = 1'b0;
    alloc_tag   = '0;
    alloc_data  = '0;
    upd         = 1'b0;
    upd_tag     = lk_tag;
    upd_data_en = 1'b0;
    upd_data    = cpu_wdata;
    inv         = 1'b0;
    clear       = 1'b0;
    if (hit_go && hit_ok) begin
      upd = 1'b1;
      if (lk_tag.excl) begin
        upd_tag.rd = lk_tag.rd | ~cpu_we;
        upd_tag.wr = lk_tag.wr |  cpu_we;
      end
      upd_data_en = cpu_we;
    end
    if (snoop_go && !any_defer) begin
      alloc          = 1'b1;
      alloc_tag.excl = !any_ok;
      alloc_tag.rd   = !cpu_we;
      alloc_tag.wr   = cpu_we;
      alloc_data     = cpu_we ? cpu_wdata : '0;
    end
    if (state_q == A_FETCH && issued_q && mrsp.done) begin
      upd         = 1'b1;
      upd_tag     = rd_tag;
      upd_data_en = 1'b1;
      upd_data    = mrsp.rdata;
    end
    if (state_q == A_CWR && issued_q && mrsp.done) inv = 1'b1;
    if (state_q == A_CCLR) clear = 1'b1;
  end

  // memory requests
  always_comb begin
    mreq = '0;
    unique case (state_q)
      A_FETCH:  begin
        mreq.valid = !issued_q;
        mreq.addr  = cpu_addr;
      end
      A_BYPASS: begin
        mreq.valid = !issued_q;
        mreq.we    = cpu_we;
        mreq.addr  = cpu_addr;
        mreq.wdata = cpu_wdata;
      end
      A_CWR:    begin
        mreq.valid = !issued_q;
        mreq.we    = 1'b1;
        mreq.addr  = rd_addr;
        mreq.wdata = rd_data;
      end
      default:  ;
    endcase
  end

  logic walk_last;
  assign walk_last = (idx_q == IW'(DEPTH - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= A_IDLE;
      blocked_q <= 1'b0;
      issued_q  <= 1'b0;
      idx_q     <= '0;
      rdata_q   <= '0;
    end else begin
      if (mreq.valid && mgnt) issued_q <= 1'b1;
      if (phase == PH_COMMIT) blocked_q <= 1'b0;
      unique case (state_q)
        A_IDLE: begin
          if (hit_go) begin
            if (hit_ok) begin
              rdata_q <= cpu_we ? cpu_wdata : lk_data;
              state_q <= A_RESP;
            end else begin
              blocked_q <= 1'b1;
            end
          end else if (take && !lk_hit && full) begin
            blocked_q <= 1'b1;
          end else if (snoop_go) begin
            if (any_defer) begin
              blocked_q <= 1'b1;
            end else if (cpu_we) begin
              rdata_q <= cpu_wdata;
              state_q <= A_RESP;
            end else begin
              idx_q    <= alloc_idx;
              issued_q <= 1'b0;
              state_q  <= A_FETCH;
            end
          end else if (phase == PH_SERIAL && serial_turn && cpu_req && !ic_expired) begin
            issued_q <= 1'b0;
            state_q  <= A_BYPASS;
          end else if (phase == PH_COMMIT && commit_go) begin
            idx_q   <= '0;
            state_q <= A_CWALK;
          end
        end
        A_RESP: state_q <= A_IDLE;
        A_FETCH, A_BYPASS: begin
          if (issued_q && mrsp.done) begin
            rdata_q <= mrsp.rdata;
            state_q <= A_RESP;
          end
        end
        A_CWALK: begin
          if (rd_valid && rd_tag.wr) begin
            issued_q <= 1'b0;
            state_q  <= A_CWR;
          end else if (walk_last) begin
            state_q <= A_CCLR;
          end else begin
            idx_q <= idx_q + 1'b1;
          end
        end
        A_CWR: begin
          if (issued_q && mrsp.done) begin
            if (walk_last) begin
              state_q <= A_CCLR;
            end else begin
              idx_q   <= idx_q + 1'b1;
              state_q <= A_CWALK;
            end
          end
        end
        A_CCLR: state_q <= A_IDLE;
        default: state_q <= A_IDLE;
      endcase
    end
  end

  assign cpu_ack     = (state_q == A_RESP);
  assign cpu_rdata   = rdata_q;
  assign commit_done = (state_q == A_CCLR);
  assign halted      = (state_q == A_IDLE) && (ic_expired || blocked_q);
  assign cpu_halt    = !(((phase == PH_PARALLEL) && !blocked_q && !ic_expired) ||
                         ((phase == PH_SERIAL) && serial_turn && !ic_expired));

  // observation pulses
  always_comb begin
    ev           = '0;
    ev.local_hit = hit_go && hit_ok;
    ev.fetch     = snoop_go && !any_defer && !any_ok;
    ev.shared    = snoop_go && !any_defer && any_ok;
    ev.conflict  = (hit_go && !hit_ok) || (snoop_go && any_defer);
    ev.overflow  = take && !lk_hit && full;
    ev.collide   = take && ((lk_hit && same_any) || (!lk_hit && !full && same_lower));
    ev.commit_wr = inv;
    for (int unsigned j = 0; j < NCPU; j++) ev.erased = ev.erased | sn_erase[j];
    ev.bypass    = (state_q == A_BYPASS) && issued_q && mrsp.done;
  end

  // A request must be held until it is acknowledged.
  property p_req_held;
    @(posedge clk) disable iff (!rst_n) (cpu_req && !cpu_ack) |=> cpu_req;
  endproperty
  a_req_held: assert property (p_req_held);

  // No arbitrator answers its own snoop: the own entry stays invalid.
  a_resp_own: assert property (@(posedge clk) disable iff (!rst_n)
                               rsp_in[ID] == SN_INVALID);

endmodule
