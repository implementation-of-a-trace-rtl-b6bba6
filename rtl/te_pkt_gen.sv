// te_pkt_gen: E-trace packet generation logic with a next/current/previous
// block pipeline.
//
// Every cycle in which the hart retires a block (iretire != 0, or an exception
// or interrupt is signalled) and tracing is on, the block enters the "next"
// stage and the older blocks move on to "current" and "previous". The block
// leaving "current" is classified with both neighbours in view, and at most one
// packet is produced for it. When tracing is switched off the pipeline drains
// with empty slots, then the encoder reports where execution stopped and sends a
// support packet.
//
// Every packet reports one instruction R, and the branch map it carries holds
// the outcomes (1 = not taken, 0 = taken, oldest in bit 0) of all branches up to
// and including R. first(B) is the first instruction of block B, last(B) its last.
//   * first block after enable      -> format 3.0 (sync)   R = first(current)
//   * previous block trapped        -> format 3.1 (trap)   R = first(current),
//                                      the handler; carries cause, interrupt, tval
//   * previous block ended in an uninferable jump (return, uninferable call or
//     jump, co-routine swap, exception return)
//                                   -> format 1/2          R = first(current)
//   * current block traps, the next block traps without retiring, or current is
//     the last block traced         -> format 1/2 with stop=1, R = last(current)
//   * resync due and branch map empty
//                                   -> format 3.0          R = last(current)
//   * 31 unreported branches        -> format 1 with branches=0, no address
// When a block needs both a report of its first instruction and a stop report
// of its last, the stop address is kept and sent in the next packet that can
// carry it: the trap packet (thaddr=0 then adds a stop-address field after
// tval), the empty slot of a block that trapped without retiring, or the final
// report when tracing ends.
//
// Packet layouts, LSB first (every packet sign-extended to PKT_W bits):
//   format 1: fmt(2)=1, branches(5), map(1/3/7/15/31), address(63), stop(1)
//             branches=0: map(31) only, no address
//   format 2: fmt(2)=2, address(63), stop(1)
//   format 3.0: fmt(2)=3, sub(2)=0, branch(1), priv(3), address(63)
//   format 3.1: fmt(2)=3, sub(2)=1, branch(1), priv(3), ecause(6), interrupt(1),
//               thaddr(1), address(63), tval(64) [, stop address(63) if thaddr=0]
//   format 3.3: fmt(2)=3, sub(2)=3, ienable(1), encoder_mode(1), qual_status(2)=1,
//               full_addr(1)
// "address" fields hold the byte address shifted right by one. In format 1/2 it
// is the difference to the previously reported address (delta address mode) or
// the address itself (full address mode); format 3 always carries full
// addresses. The stop bit is sent XORed with the address MSB, so a clear stop
// bit is removed by the sign compression. "branch" in format 3 is 0 when R is a
// taken branch, otherwise 1.
//
// Resync (format 3.0) becomes due after 2^(syncmax+4) packets (syncmode 1) or
// hart clock cycles (syncmode 2); syncmode 0 and 3 disable it.
//
// The pipeline stages, the format set, full/delta address mode, syncmode and
// syncmax follow the document; which rule picks which packet, the stop bit, the
// stop-address field and the exact bit layout are this design's reading of the
// E-trace standard, which the document cites but does not reproduce.
// Timing: the packet for a block is registered (pkt_valid) in the cycle after
// the block leaves the "current" stage.
module te_pkt_gen
  import etrace_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,       // synchronous, active low
  input  te_cfg_t          cfg,
  input  hart_if_t         hart,
  output logic             pkt_valid,
  output logic [PKT_W-1:0] pkt,
  output logic             idle         // nothing held, nothing left to report
);

  typedef enum logic [1:0] {S_OFF, S_RUN, S_END_STOP, S_END_SUPPORT} state_e;

  state_e           state_q;
  hart_if_t         nxt_q, cur_q, prv_q;
  logic             nxt_v, cur_v, prv_v;
  logic             first_q;
  logic [BMAP_W-1:0] bmap_q;
  logic [5:0]       bcnt_q;
  logic [XLEN-1:0]  last_addr_q;
  logic             stop_pend_q;
  logic [XLEN-1:0]  stop_addr_q;
  logic [19:0]      sync_cnt_q;
  logic             sync_pend_q;

  // ---------------------------------------------------------------------------
  // pipeline movement
  wire blk_in  = (hart.iretire != '0) || is_exc(hart.itype);
  wire accept  = (state_q == S_RUN || state_q == S_OFF) && cfg.tracing && blk_in;
  wire drain   = (state_q == S_RUN) && !cfg.tracing && (nxt_v || cur_v);
  wire shift   = accept || drain;
  wire decide  = shift && cur_v;

  // ---------------------------------------------------------------------------
  // packet assembly helpers
  logic [PKT_W-1:0] asm_bits;

  function automatic logic [XLEN-1:0] first_addr(hart_if_t b);
    return b.iaddr;
  endfunction

  function automatic logic [XLEN-1:0] last_addr(hart_if_t b);
    return b.iaddr + XLEN'({b.iretire, 1'b0}) - (b.ilastsize ? XLEN'(4) : XLEN'(2));
  endfunction

  function automatic logic single_instr(hart_if_t b);
    return b.iretire == (b.ilastsize ? IRETIRE_W'(2) : IRETIRE_W'(1));
  endfunction

  // ---------------------------------------------------------------------------
  // decision
  typedef enum logic [2:0] {K_NONE, K_SYNC, K_TRAP, K_ADDR, K_FULLMAP, K_SUPPORT} kind_e;

  kind_e            kind;
  logic [XLEN-1:0]  rep_addr;
  logic             rep_stop;
  logic             sync_branch;      // format 3 branch bit
  logic             trap_thaddr;
  logic [BMAP_W-1:0] map_out;         // map carried by the packet
  logic [5:0]       cnt_out;
  logic [BMAP_W-1:0] bmap_d;
  logic [5:0]       bcnt_d;
  logic             stop_pend_d;
  logic [XLEN-1:0]  stop_addr_d;
  logic             first_d;
  logic             clear_sync;

  always_comb begin
    logic c_exc, c_exc0, c_br, c_tk, c_single, p_exc, p_upd, n_exc0, c_end;
    logic need_arrival, need_stop, own_in_pkt;
    logic [BMAP_W-1:0] m;
    logic [5:0]        n;

    kind         = K_NONE;
    rep_addr     = '0;
    rep_stop     = 1'b0;
    sync_branch  = 1'b1;
    trap_thaddr  = 1'b1;
    map_out      = bmap_q;
    cnt_out      = bcnt_q;
    bmap_d       = bmap_q;
    bcnt_d       = bcnt_q;
    stop_pend_d  = stop_pend_q;
    stop_addr_d  = stop_addr_q;
    first_d      = first_q;
    clear_sync   = 1'b0;

    c_exc    = is_exc(cur_q.itype);
    c_exc0   = c_exc && (cur_q.iretire == '0);
    c_br     = is_branch(cur_q.itype);
    c_tk     = (cur_q.itype == IT_TBRANCH);
    c_single = single_instr(cur_q);
    p_exc    = prv_v && is_exc(prv_q.itype);
    p_upd    = prv_v && is_updiscon(prv_q.itype);
    n_exc0   = nxt_v && is_exc(nxt_q.itype) && (nxt_q.iretire == '0);
    c_end    = !nxt_v;                          // only while draining
    need_arrival = first_q || p_exc || p_upd;
    need_stop    = (c_exc && !c_exc0) || n_exc0 || c_end;
    own_in_pkt   = 1'b0;
    m            = bmap_q;
    n            = bcnt_q;

    if (decide) begin
      if (c_exc0) begin
        // nothing retired: use the slot to deliver a pending stop report
        if (stop_pend_q) begin
          kind        = K_ADDR;
          rep_addr    = stop_addr_q;
          rep_stop    = 1'b1;
          stop_pend_d = 1'b0;
          bmap_d      = '0;
          bcnt_d      = '0;
        end
      end else if (need_arrival) begin
        // report the first instruction of the current block
        own_in_pkt = c_single && c_br;
        rep_addr   = first_addr(cur_q);
        if (first_q) begin
          kind        = K_SYNC;
          sync_branch = !(own_in_pkt && c_tk);
          first_d     = 1'b0;
          clear_sync  = 1'b1;
        end else if (p_exc) begin
          kind        = K_TRAP;
          sync_branch = !(own_in_pkt && c_tk);
          trap_thaddr = !stop_pend_q;
          stop_pend_d = 1'b0;
          clear_sync  = 1'b1;
        end else begin
          kind = K_ADDR;
          m = bmap_q;
          n = bcnt_q;
          if (own_in_pkt) begin
            m[n[4:0]] = !c_tk;
            n = n + 6'd1;
          end
          map_out = m;
          cnt_out = n;
        end
        // the block's own branch is reported later unless R was that branch
        bmap_d = '0;
        bcnt_d = '0;
        if (c_br && !c_single) begin
          bmap_d[0] = !c_tk;
          bcnt_d    = 6'd1;
        end
        if (need_stop) begin
          stop_pend_d = 1'b1;
          stop_addr_d = last_addr(cur_q);
        end
      end else if (need_stop) begin
        // report the last instruction of the current block, where execution stops
        kind     = K_ADDR;
        rep_addr = last_addr(cur_q);
        rep_stop = 1'b1;
        m = bmap_q;
        n = bcnt_q;
        if (c_br) begin
          m[n[4:0]] = !c_tk;
          n = n + 6'd1;
        end
        map_out = m;
        cnt_out = n;
        bmap_d  = '0;
        bcnt_d  = '0;
      end else if (sync_pend_q && bcnt_q == '0) begin
        kind        = K_SYNC;
        rep_addr    = last_addr(cur_q);
        sync_branch = !(c_br && c_tk);
        clear_sync  = 1'b1;
      end else if (c_br) begin
        m = bmap_q;
        n = bcnt_q;
        m[n[4:0]] = !c_tk;
        n = n + 6'd1;
        if (n == 6'(BMAP_W)) begin
          kind    = K_FULLMAP;
          map_out = m;
          cnt_out = n;
          bmap_d  = '0;
          bcnt_d  = '0;
        end else begin
          bmap_d = m;
          bcnt_d = n;
        end
      end
    end else if (state_q == S_END_STOP) begin
      if (stop_pend_q) begin
        kind        = K_ADDR;
        rep_addr    = stop_addr_q;
        rep_stop    = 1'b1;
        stop_pend_d = 1'b0;
        bmap_d      = '0;
        bcnt_d      = '0;
      end
    end else if (state_q == S_END_SUPPORT) begin
      kind = K_SUPPORT;
    end
  end

  // ---------------------------------------------------------------------------
  // packet assembly
  logic [XLEN-1:0] addr_field;

  always_comb begin
    logic [PKT_W-1:0] b;
    int unsigned      p, w;
    logic [XLEN-1:0]  diff;

    diff = rep_addr - last_addr_q;
    if (cfg.full_addr || kind == K_SYNC || kind == K_TRAP)
      addr_field = XLEN'(rep_addr[XLEN-1:1]);
    else
      addr_field = {diff[XLEN-1], diff[XLEN-1:1]};

    b = '0;
    p = 0;
    w = 0;
    unique case (kind)
      K_SYNC: begin
        b[1:0] = FMT_SYNC;  b[3:2] = SF_START;  b[4] = sync_branch;
        b[7:5] = cur_q.priv;
        b[8 +: ADDR_W] = addr_field[ADDR_W-1:0];
        p = 8 + ADDR_W;
      end
      K_TRAP: begin
        b[1:0] = FMT_SYNC;  b[3:2] = SF_TRAP;  b[4] = sync_branch;
        b[7:5] = cur_q.priv;
        b[8 +: CAUSE_W] = prv_q.cause;
        b[8 + CAUSE_W] = (prv_q.itype == IT_INT);
        b[9 + CAUSE_W] = trap_thaddr;
        p = 10 + CAUSE_W;
        b[p +: ADDR_W] = addr_field[ADDR_W-1:0];
        p = p + ADDR_W;
        b[p +: XLEN] = prv_q.tval;
        p = p + XLEN;
        if (!trap_thaddr) begin
          b[p +: ADDR_W] = stop_addr_q[XLEN-1:1];
          p = p + ADDR_W;
        end
      end
      K_ADDR: begin
        if (cnt_out == '0) begin
          b[1:0] = FMT_ADDR;
          p = 2;
        end else begin
          w = bmap_width(int'(cnt_out));
          b[1:0] = FMT_BRANCH;
          b[6:2] = cnt_out[4:0];
          for (int unsigned i = 0; i < BMAP_W; i++)
            if (i < w) b[7 + i] = map_out[i];
          p = 7 + w;
        end
        for (int unsigned i = 0; i < ADDR_W; i++)
          b[p + i] = addr_field[i];
        p = p + ADDR_W;
        b[p] = addr_field[ADDR_W-1] ^ rep_stop;
        p = p + 1;
      end
      K_FULLMAP: begin
        b[1:0] = FMT_BRANCH;
        b[6:2] = 5'd0;
        b[7 +: BMAP_W] = map_out;
        p = 7 + BMAP_W;
      end
      K_SUPPORT: begin
        b[1:0] = FMT_SYNC;  b[3:2] = SF_SUPPORT;
        b[4] = 1'b0;            // ienable: trace now off
        b[5] = 1'b0;            // encoder_mode: branch trace
        b[7:6] = 2'd1;          // qual_status: ended, last instruction reported
        b[8] = cfg.full_addr;
        b[9] = 1'b0;            // sign-extension guard: keeps the packet positive
        p = 10;
      end
      default: p = 1;
    endcase
    // sign-extend from the top field
    for (int unsigned i = 0; i < PKT_W; i++)
      if (i >= p) b[i] = b[p - 1];
    asm_bits = b;
  end

  // ---------------------------------------------------------------------------
  // state
  wire pkt_out = (kind != K_NONE);
  wire [19:0] sync_max = 20'(1) << (5'(cfg.syncmax) + 5'd4);   // 2^4 .. 2^19

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q     <= S_OFF;
      nxt_v       <= 1'b0;
      cur_v       <= 1'b0;
      prv_v       <= 1'b0;
      nxt_q       <= '0;
      cur_q       <= '0;
      prv_q       <= '0;
      first_q     <= 1'b0;
      bmap_q      <= '0;
      bcnt_q      <= '0;
      last_addr_q <= '0;
      stop_pend_q <= 1'b0;
      stop_addr_q <= '0;
      sync_cnt_q  <= '0;
      sync_pend_q <= 1'b0;
      pkt_valid   <= 1'b0;
      pkt         <= '0;
    end else begin
      pkt_valid <= pkt_out;
      if (pkt_out) pkt <= asm_bits;

      bmap_q      <= bmap_d;
      bcnt_q      <= bcnt_d;
      stop_pend_q <= stop_pend_d;
      stop_addr_q <= stop_addr_d;
      first_q     <= first_d;

      if (pkt_out && kind != K_FULLMAP && kind != K_SUPPORT)
        last_addr_q <= rep_addr;

      // resync timer
      if (clear_sync || state_q != S_RUN || cfg.syncmode == SYNC_OFF ||
          cfg.syncmode == SYNC_HWORDS) begin
        sync_cnt_q  <= '0;
        sync_pend_q <= 1'b0;
      end else if (!sync_pend_q &&
                   ((cfg.syncmode == SYNC_PACKETS && pkt_out) ||
                     cfg.syncmode == SYNC_CYCLES)) begin
        if (sync_cnt_q + 20'd1 >= sync_max) begin
          sync_cnt_q  <= '0;
          sync_pend_q <= 1'b1;
        end else begin
          sync_cnt_q <= sync_cnt_q + 20'd1;
        end
      end

      if (shift) begin
        nxt_q <= hart;
        nxt_v <= accept;
        cur_q <= nxt_q;
        cur_v <= nxt_v;
        prv_q <= cur_q;
        prv_v <= cur_v;
      end

      unique case (state_q)
        S_OFF: if (cfg.tracing) begin
          state_q <= S_RUN;
          first_q <= 1'b1;
          bmap_q  <= '0;
          bcnt_q  <= '0;
          prv_v   <= 1'b0;
        end
        S_RUN: if (!cfg.tracing && !nxt_v && !cur_v) begin
          // nothing was traced at all: no report needed
          state_q <= first_q ? S_OFF : S_END_STOP;
        end
        S_END_STOP:    state_q <= S_END_SUPPORT;
        S_END_SUPPORT: state_q <= S_OFF;
        default:       state_q <= S_OFF;
      endcase
    end
  end

  assign idle = (state_q == S_OFF) && !pkt_valid;

  // at most 31 unreported branches are ever held
  a_bcnt: assert property (@(posedge clk) disable iff (!rst_n) bcnt_q < 6'(BMAP_W));

endmodule
