// coherence_controller: the finite-state machine that serves the loads and
// stores of both processors and keeps their caches coherent under MESI.
//
// One transaction is served at a time: the one the bus controller grants.
// The controller reads both caches' codes and tags from the coherency tag
// (through the requester's row of its lookup ports) and both caches' lines,
// decides with three copies of mesi_next_state (requester, victim eviction,
// other cache snooping the bus), and writes the caches, the coherency tag and
// the main memory. Sequence of states:
//
//   IDLE    wait for a grant; latch processor, address, load/store, data
//   LOOKUP  hit:  load -> answer at once (direct read);
//                 store in M/E -> write word, state M (direct write);
//                 store in S -> write word, state M, invalidate other copy;
//           miss: modified victim -> WB, otherwise (clean or no victim) SNOOP
//   WB      write the modified victim line back to main memory
//   SNOOP   apply BusRd (load) or BusRdX (store) to the other cache: M/E send
//           the line (cache to cache), M on BusRd is also written back, the
//           other copy goes to S (load) or I (store)
//   MEMRD   read the line from main memory (only if the other cache did not
//           supply it)
//   FILL    load the line into the requester's cache (with the stored word
//           merged for a store); new state E or S for a load, M for a store;
//           answer the processor
//
// Timing (cycles from the edge that latches the request to `ack`): hit 1;
// miss 3 when the other cache supplies the line, 4 from memory, +1 for a
// modified victim. `ack[p]` is a one-cycle pulse with `rdata` valid in that
// cycle; it is also the bus controller's `done`. The processor must hold its
// request and address until ack.
//
// The S -> M "conflict" path of the transient-state diagram is tracked: a
// store that sees its line in S while it waits for the bus, and finds the line
// invalidated by the other processor when its turn comes, is completed as a
// store miss (I -> M) and reported on events.conflict.
//
// The document gives the protocol (state table and diagrams) and says the
// controller is an FSM working on the coherency tag; the state sequence,
// timing and ports above are this design's own.
module coherence_controller
  import mesi_pkg::*;
#(
  parameter int unsigned SETS_P       = mesi_pkg::SETS,
  parameter int unsigned LINE_WORDS_P = mesi_pkg::LINE_WORDS,
  parameter int unsigned MEM_WORDS_P  = mesi_pkg::MEM_WORDS,
  localparam int unsigned IDX_W  = $clog2(SETS_P),
  localparam int unsigned WOFF_W = $clog2(LINE_WORDS_P),
  localparam int unsigned TAG_W  = ADDR_W - IDX_W - WOFF_W - 2,
  localparam int unsigned LINES  = MEM_WORDS_P / LINE_WORDS_P,
  localparam int unsigned LADR_W = (LINES > 1) ? $clog2(LINES) : 1
) (
  input  logic                                clk,
  input  logic                                rst,
  // processors
  input  logic [NCORES-1:0]                   p_rd,
  input  logic [NCORES-1:0]                   p_wr,
  input  logic [NCORES-1:0][ADDR_W-1:0]       p_addr,
  input  logic [NCORES-1:0][DATA_W-1:0]       p_wdata,
  output logic [NCORES-1:0]                   ack,
  output logic [DATA_W-1:0]                   rdata,
  // bus controller
  input  logic [NCORES-1:0]                   gnt,
  // coherency tag: lookup results and write ports
  input  logic [NCORES-1:0][NCORES-1:0]       ct_hit,
  input  mesi_code_t                          ct_code [NCORES][NCORES],
  output logic [NCORES-1:0]                   ct_we,
  output logic [IDX_W-1:0]                    ct_idx  [NCORES],
  output mesi_code_t                          ct_wcode[NCORES],
  output logic [TAG_W-1:0]                    ct_wtag [NCORES],
  // caches: lookup address shared by both, per-cache results and commands
  output logic [ADDR_W-1:0]                   c_lk_addr,
  input  logic [DATA_W-1:0]                   c_rd_word [NCORES],
  input  logic [LINE_WORDS_P-1:0][DATA_W-1:0] c_rd_line [NCORES],
  input  logic [TAG_W-1:0]                    c_rd_tag  [NCORES],
  output logic [NCORES-1:0]                   c_wr_en,
  output logic [ADDR_W-1:0]                   c_wr_addr,
  output logic [DATA_W-1:0]                   c_wr_data,
  output logic [NCORES-1:0]                   c_fill_en,
  output logic [IDX_W-1:0]                    c_fill_idx,
  output logic [TAG_W-1:0]                    c_fill_tag,
  output logic [LINE_WORDS_P-1:0][DATA_W-1:0] c_fill_line,
  output logic                                c_fill_dirty,
  output logic [NCORES-1:0]                   c_inv_en,
  output logic [NCORES-1:0]                   c_clean_en,
  output logic [IDX_W-1:0]                    c_st_idx,
  // main memory
  output logic [LADR_W-1:0]                   m_line_addr,
  output logic                                m_re,
  output logic                                m_we,
  output logic [LINE_WORDS_P-1:0][DATA_W-1:0] m_wr_line,
  input  logic [LINE_WORDS_P-1:0][DATA_W-1:0] m_rd_line,
  // observability
  output ctrl_events_t                        events,
  output logic                                busy
);

  typedef enum logic [2:0] {
    C_IDLE, C_LOOKUP, C_WB, C_SNOOP, C_MEMRD, C_FILL
  } cstate_e;

  cstate_e                             st_q, st_d;
  logic                                p_q;          // requester (0 = MIPS1)
  logic [ADDR_W-1:0]                   addr_q;
  logic                                wr_q;
  logic [DATA_W-1:0]                   wdata_q;
  logic                                shared_q;     // other cache kept a copy
  logic                                from_c2c_q;   // line came from the other cache
  logic [LINE_WORDS_P-1:0][DATA_W-1:0] buf_q;
  logic [NCORES-1:0]                   upg_pend_q;   // store waiting while line in S
  logic                                pend_start_q; // upg_pend of this transaction

  logic                                q;            // the other processor
  logic [IDX_W-1:0]                    idx;
  logic [WOFF_W-1:0]                   woff;
  logic [TAG_W-1:0]                    atag;
  logic                                own_hit, oth_hit;
  mesi_state_e                         own_state, oth_state;

  // next-state function instances
  mesi_state_e own_next, oth_next, ev_next;
  logic        own_brd, own_brdx, own_send_unused, own_wb_unused;
  logic        oth_brd_unused, oth_brdx_unused, oth_send, oth_wb;
  logic        ev_brd_unused, ev_brdx_unused, ev_send_unused, victim_wb;

  logic [LINE_WORDS_P-1:0][DATA_W-1:0] fill_line;
  logic                                gnt_p;
  logic [ADDR_W-1:0]                   victim_addr;

  assign q    = !p_q;
  assign idx  = addr_q[2+WOFF_W +: IDX_W];
  assign woff = addr_q[2 +: WOFF_W];
  assign atag = addr_q[ADDR_W-1 -: TAG_W];

  assign own_hit   = ct_hit[p_q][p_q];
  assign oth_hit   = ct_hit[p_q][q];
  assign own_state = decode_code(ct_code[p_q][p_q], p_q);
  assign oth_state = decode_code(ct_code[p_q][q], q);

  mesi_next_state u_own (
    .state     (own_hit ? own_state : ST_I),
    .event_i   (wr_q ? EV_PR_WR : EV_PR_RD),
    .shared    (shared_q),
    .next_state(own_next),
    .bus_rd    (own_brd),
    .bus_rdx   (own_brdx),
    .send_data (own_send_unused),
    .write_back(own_wb_unused)
  );

  mesi_next_state u_victim (
    .state     (own_hit ? ST_I : own_state),
    .event_i   (EV_EVICT),
    .shared    (1'b0),
    .next_state(ev_next),
    .bus_rd    (ev_brd_unused),
    .bus_rdx   (ev_brdx_unused),
    .send_data (ev_send_unused),
    .write_back(victim_wb)
  );

  mesi_next_state u_other (
    .state     (oth_hit ? oth_state : ST_I),
    .event_i   (wr_q ? EV_BUS_RDX : EV_BUS_RD),
    .shared    (1'b0),
    .next_state(oth_next),
    .bus_rd    (oth_brd_unused),
    .bus_rdx   (oth_brdx_unused),
    .send_data (oth_send),
    .write_back(oth_wb)
  );

  assign victim_addr = {c_rd_tag[p_q], idx, {(WOFF_W+2){1'b0}}};
  assign gnt_p = gnt[1];   // granted processor when gnt != 0

  // Line loaded into the requester: other cache's copy or memory, with the
  // store's word merged in.
  always_comb begin
    fill_line = from_c2c_q ? buf_q : m_rd_line;
    if (wr_q) fill_line[woff] = wdata_q;
  end

  always_comb begin
    st_d         = st_q;
    ack          = '0;
    rdata        = '0;
    ct_we        = '0;
    ct_idx       = '{default: idx};
    ct_wcode     = '{default: '0};
    ct_wtag      = '{default: atag};
    c_lk_addr    = addr_q;
    c_wr_en      = '0;
    c_wr_addr    = addr_q;
    c_wr_data    = wdata_q;
    c_fill_en    = '0;
    c_fill_idx   = idx;
    c_fill_tag   = atag;
    c_fill_line  = fill_line;
    c_fill_dirty = wr_q;
    c_inv_en     = '0;
    c_clean_en   = '0;
    c_st_idx     = idx;
    m_line_addr  = addr_q[2+WOFF_W +: LADR_W];
    m_re         = 1'b0;
    m_we         = 1'b0;
    m_wr_line    = c_rd_line[p_q];
    events       = '0;

    unique case (st_q)
      C_IDLE: begin
        if (|gnt) st_d = C_LOOKUP;
      end

      C_LOOKUP: begin
        if (own_hit) begin
          ack[p_q] = 1'b1;
          st_d     = C_IDLE;
          if (!wr_q) begin
            rdata         = c_rd_word[p_q];
            events.rd_hit = 1'b1;
          end else begin
            c_wr_en[p_q]    = 1'b1;
            ct_we[p_q]      = 1'b1;
            ct_wcode[p_q]   = encode_code(own_next, p_q);
            if (own_brdx) begin
              // S -> M: invalidate the other cache's copy
              events.upgrade = 1'b1;
              if (oth_hit) begin
                events.invalidate = 1'b1;
                c_inv_en[q]       = 1'b1;
                ct_we[q]          = 1'b1;
                ct_wcode[q]       = encode_code(oth_next, q);
              end
            end else begin
              events.wr_hit = 1'b1;
            end
          end
        end else begin
          events.conflict = wr_q && pend_start_q;
          if (own_state != ST_I) begin
            events.writeback    = victim_wb;
            events.silent_evict = !victim_wb;
          end
          st_d = (own_state != ST_I && victim_wb) ? C_WB : C_SNOOP;
        end
      end

      C_WB: begin
        m_we        = 1'b1;
        m_wr_line   = c_rd_line[p_q];
        m_line_addr = victim_addr[2+WOFF_W +: LADR_W];
        st_d        = C_SNOOP;
      end

      C_SNOOP: begin
        if (oth_hit) begin
          ct_we[q]    = 1'b1;
          ct_wcode[q] = encode_code(oth_next, q);
          if (oth_next == ST_I) begin
            c_inv_en[q]       = 1'b1;
            events.invalidate = 1'b1;
          end
          if (oth_wb) begin
            m_we         = 1'b1;
            m_wr_line    = c_rd_line[q];
            c_clean_en[q] = 1'b1;
            events.flush = 1'b1;
          end
          events.c2c = oth_send;
        end
        st_d = (oth_hit && oth_send) ? C_FILL : C_MEMRD;
      end

      C_MEMRD: begin
        m_re = 1'b1;
        st_d = C_FILL;
      end

      C_FILL: begin
        c_fill_en[p_q] = 1'b1;
        ct_we[p_q]     = 1'b1;
        ct_wcode[p_q]  = encode_code(own_next, p_q);
        ack[p_q]       = 1'b1;
        rdata          = fill_line[woff];
        if (wr_q)          events.wr_miss        = 1'b1;
        else if (shared_q) events.rd_miss_shared = 1'b1;
        else               events.rd_miss_excl   = 1'b1;
        st_d = C_IDLE;
      end

      default: st_d = C_IDLE;
    endcase
  end

  assign busy = (st_q != C_IDLE);

  // A processor asks for a load or a store, never both at once.
  assert property (@(posedge clk) disable iff (rst) (p_rd & p_wr) == '0);
  // A load miss always issues a BusRd, a store miss or upgrade a BusRdX.
  assert property (@(posedge clk) disable iff (rst)
    (st_q == C_FILL) |-> (wr_q ? own_brdx : own_brd));
  // A replaced line always ends Invalid.
  assert property (@(posedge clk) disable iff (rst)
    (st_q == C_LOOKUP && !own_hit) |-> (ev_next == ST_I));

  always_ff @(posedge clk) begin
    if (rst) begin
      st_q         <= C_IDLE;
      p_q          <= 1'b0;
      addr_q       <= '0;
      wr_q         <= 1'b0;
      wdata_q      <= '0;
      shared_q     <= 1'b0;
      from_c2c_q   <= 1'b0;
      buf_q        <= '0;
      upg_pend_q   <= '0;
      pend_start_q <= 1'b0;
    end else begin
      st_q <= st_d;
      if (st_q == C_IDLE && |gnt) begin
        p_q          <= gnt_p;
        addr_q       <= p_addr[gnt_p];
        wr_q         <= p_wr[gnt_p];
        wdata_q      <= p_wdata[gnt_p];
        shared_q     <= 1'b0;
        from_c2c_q   <= 1'b0;
        pend_start_q <= upg_pend_q[gnt_p];
      end
      if (st_q == C_SNOOP) begin
        shared_q   <= oth_hit;
        from_c2c_q <= oth_hit && oth_send;
        buf_q      <= c_rd_line[q];
      end
      // Stores waiting for the bus on a line held in S (transient S -> M).
      for (int p = 0; p < NCORES; p++) begin
        if (st_q == C_IDLE && |gnt && gnt_p == p[0])
          upg_pend_q[p] <= 1'b0;
        else if (p_wr[p] && !(busy && p_q == p[0]) && ct_hit[p][p] &&
                 decode_code(ct_code[p][p], p[0]) == ST_S)
          upg_pend_q[p] <= 1'b1;
        else if (!p_wr[p])
          upg_pend_q[p] <= 1'b0;
      end
    end
  end

endmodule
