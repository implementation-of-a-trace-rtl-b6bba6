// te_tb_pkg: verification helpers shared by the encoder testbenches.
//
// * A random program: NPROG instructions of 2 or 4 bytes laid out from BASE,
//   each one sequential, a conditional branch, an inferable jump or an
//   uninferable jump (with a fixed branch/jump target where one applies).
// * A hart model that walks the program and emits one retirement block per call
//   in the hart-to-encoder format (up to two instructions per block, a block ends
//   at every branch or jump), with random branch outcomes, uninferable jump
//   targets, exceptions and interrupts (including ones that retire nothing), and
//   idle cycles. Every retired address is appended to the golden list.
// * A packet parser and a decoder that, knowing only the program and the
//   packets, rebuilds the sequence of executed addresses; the testbenches compare
//   it with the golden list. The decoder follows the packet rules described in
//   te_pkt_gen and is written independently of it.
package te_tb_pkg;
  import etrace_pkg::*;

  localparam int          NPROG   = 400;
  localparam longint      BASE    = 64'h0000_0000_8000_0000;
  localparam int          HANDLER = 300;   // trap handler entry index

  typedef enum int {K_SEQ, K_BR, K_IJ, K_UJ} ikind_e;

  longint unsigned p_addr [NPROG];
  int              p_size [NPROG];
  ikind_e          p_kind [NPROG];
  itype_e          p_itype[NPROG];   // itype reported when the instruction ends a block
  int              p_tgt  [NPROG];
  int              addr2idx[longint unsigned];

  // ---------------------------------------------------------------- program
  function automatic void build_program(int unsigned seed, bit far_addr = 0);
    longint unsigned a;
    int r;
    void'($urandom(seed));
    a = far_addr ? 64'hFFFF_FFFF_FFF0_0000 : BASE;
    addr2idx.delete();
    for (int i = 0; i < NPROG; i++) begin
      p_addr[i] = a;
      p_size[i] = ($urandom_range(0, 3) == 0) ? 2 : 4;
      addr2idx[a] = i;
      a += longint'(p_size[i]);
      r = $urandom_range(0, 99);
      p_tgt[i] = $urandom_range(0, NPROG - 1);
      if (r < 62)      begin p_kind[i] = K_SEQ; p_itype[i] = IT_NONE; end
      else if (r < 80) begin p_kind[i] = K_BR;  p_itype[i] = IT_TBRANCH; end
      else if (r < 88) begin
        p_kind[i] = K_IJ;
        p_itype[i] = ($urandom_range(0, 1) == 0) ? IT_IJUMP : IT_ICALL;
        // inferable jumps only go forward and never to the last instruction, so
        // every loop passes a branch or an uninferable jump (a loop of inferable
        // jumps alone would give a trace whose repeat count cannot be recovered)
        p_tgt[i] = (i + 1 < NPROG - 2) ? $urandom_range(i + 1, NPROG - 2) : NPROG - 2;
      end else begin
        p_kind[i] = K_UJ;
        case ($urandom_range(0, 3))
          0: p_itype[i] = IT_RETURN;
          1: p_itype[i] = IT_UCALL;
          2: p_itype[i] = IT_UJUMP;
          default: p_itype[i] = IT_OUJUMP;
        endcase
      end
    end
    // the last instruction jumps back so the program never runs off its end
    p_kind[NPROG-2]  = K_BR;
    p_itype[NPROG-2] = IT_TBRANCH;
    p_kind[NPROG-1]  = K_IJ;
    p_itype[NPROG-1] = IT_IJUMP;
    p_tgt[NPROG-1]   = 0;
  endfunction

  // ---------------------------------------------------------------- hart model
  int              h_pc;            // index of the next instruction
  bit              h_prev_exc;      // last block was a trap
  longint unsigned golden[$];
  int              st_exc, st_int, st_exc0, st_eret;
  int              exc_rate = 40;   // 1 in exc_rate blocks traps

  function automatic void hart_reset(int start);
    h_pc = start;
    h_prev_exc = 0;
    golden.delete();
    st_exc = 0; st_int = 0; st_exc0 = 0; st_eret = 0;
  endfunction

  // produce one block; valid=0 means an idle cycle
  function automatic void hart_step(output hart_if_t b, output bit valid);
    int n, i, hw;
    bit trap, done;
    b = '0;
    valid = 0;
    if ($urandom_range(0, 5) == 0) return;          // idle cycle
    valid = 1;
    b.iaddr = p_addr[h_pc];
    b.priv  = 3'd3;
    trap = ($urandom_range(0, exc_rate - 1) == 0);
    n  = trap ? $urandom_range(h_prev_exc ? 1 : 0, 2) : 2;
    hw = 0;
    done = 0;
    b.itype = IT_NONE;
    for (int k = 0; k < n && !done; k++) begin
      i = h_pc;
      golden.push_back(p_addr[i]);
      hw += p_size[i] / 2;
      b.ilastsize = (p_size[i] == 4);
      case (p_kind[i])
        K_SEQ: h_pc = (i + 1) % NPROG;
        K_BR: begin
          if ($urandom_range(0, 1) == 0) begin
            h_pc = p_tgt[i];
            b.itype = IT_TBRANCH;
          end else begin
            h_pc = (i + 1) % NPROG;
            b.itype = IT_NTBRANCH;
          end
          done = 1;
        end
        K_IJ: begin
          h_pc = p_tgt[i];
          b.itype = p_itype[i];
          done = 1;
        end
        default: begin
          h_pc = $urandom_range(0, NPROG - 1);
          b.itype = p_itype[i];
          done = 1;
        end
      endcase
    end
    b.iretire = IRETIRE_W'(hw);
    if (trap) begin
      // a trap following the retired instructions replaces the block's own type
      if (b.itype != IT_NONE && hw != 0) begin
        // the block already ended in a branch or jump: trap on the next block
        h_prev_exc = 0;
        return;
      end
      if ($urandom_range(0, 2) == 0) begin
        b.itype = IT_INT;
        st_int++;
      end else begin
        b.itype = IT_EXC;
        st_exc++;
      end
      if (hw == 0) begin
        b.iaddr = p_addr[h_pc];
        st_exc0++;
      end
      b.cause = CAUSE_W'($urandom_range(0, 15));
      b.tval  = {$urandom(), $urandom()};
      h_pc = HANDLER + $urandom_range(0, 3);
      h_prev_exc = 1;
    end else begin
      h_prev_exc = 0;
    end
  endfunction

  // ---------------------------------------------------------------- packets
  typedef logic [PKT_W-1:0] pkt_t;
  pkt_t pkts[$];

  // counts of each packet kind seen by the decoder
  int c_start, c_resync, c_trap, c_trap_stop, c_arrival, c_stop, c_fullmap, c_support;

  function automatic pkt_t sext_bytes(logic [PKT_W-1:0] raw, int nbytes);
    pkt_t p;
    int msb;
    msb = 8 * nbytes - 1;
    for (int i = 0; i < PKT_W; i++) p[i] = (i <= msb) ? raw[i] : raw[msb];
    return p;
  endfunction

  // append the packets held in a stream of bytes (oldest first)
  function automatic int parse_bytes(ref byte unsigned s[$]);
    int pos, len, n;
    logic [PKT_W-1:0] raw;
    pos = 0;
    n = 0;
    while (pos < s.size()) begin
      len = s[pos] & 8'h1F;
      if (len == 0) begin pos++; continue; end   // zero padding
      if (pos + len >= s.size() + 1) break;
      raw = '0;
      for (int k = 0; k < len; k++) raw[8*k +: 8] = s[pos + 1 + k];
      pkts.push_back(sext_bytes(raw, len));
      pos += len + 1;
      n++;
    end
    return n;
  endfunction

  function automatic int bmw(int n);
    if (n == 0)       return 31;
    else if (n == 1)  return 1;
    else if (n <= 3)  return 3;
    else if (n <= 7)  return 7;
    else if (n <= 15) return 15;
    else              return 31;
  endfunction

  // ---------------------------------------------------------------- decoder
  typedef struct {
    int              fmt, sub;
    bit              has_addr, stop, branch, thaddr;
    longint unsigned addr, stop_addr;
    int              nbits;
    bit              bits[31];
  } dpkt_t;

  longint unsigned d_last;
  bit              dbg = 0;          // print the parsed packets and, on a mismatch, the last retired addresses

  function automatic dpkt_t unpack(pkt_t b, bit full_addr);
    dpkt_t d;
    logic [62:0] f;
    int w, c;
    d = '{default: 0};
    d.fmt = int'(b[1:0]);
    if (d.fmt == 3) begin
      d.sub = int'(b[3:2]);
      d.branch = b[4];
      if (d.sub == 0) begin
        d.has_addr = 1;
        d.addr = {b[8 +: 63], 1'b0};
      end else if (d.sub == 1) begin
        d.has_addr = 1;
        d.thaddr = b[15];
        d.addr = {b[16 +: 63], 1'b0};
        if (!d.thaddr) d.stop_addr = {b[143 +: 63], 1'b0};
      end
      if (d.has_addr) d_last = d.addr;
    end else begin
      if (d.fmt == 1) begin
        c = int'(b[6:2]);
        w = bmw(c);
        d.nbits = (c == 0) ? 31 : c;
        for (int i = 0; i < 31; i++) d.bits[i] = (i < d.nbits) ? b[7 + i] : 1'b0;
        if (c == 0) return d;
        f = b[7 + w +: 63];
        d.stop = b[7 + w + 63] ^ f[62];
      end else begin
        f = b[2 +: 63];
        d.stop = b[65] ^ f[62];
      end
      d.has_addr = 1;
      if (full_addr) d.addr = {f, 1'b0};
      else           d.addr = d_last + {{1{f[62]}}, f} * 2;
      d_last = d.addr;
    end
    return d;
  endfunction

  // Rebuild the executed address list from pkts; returns the number of mismatches
  function automatic int decode(bit full_addr, output int decoded);
    dpkt_t dp[$];
    int k, gi, idx, errors, steps;
    longint unsigned pc, npc;
    bit q[$];
    bit sbit_v, sbit, pend_v, pend_stop, finished, b, taken;
    longint unsigned pend_a;

    errors = 0;
    decoded = 0;
    d_last = 0;
    c_start = 0; c_resync = 0; c_trap = 0; c_trap_stop = 0;
    c_arrival = 0; c_stop = 0; c_fullmap = 0; c_support = 0;
    foreach (pkts[i]) begin
      dp.push_back(unpack(pkts[i], full_addr));
      if (dbg && i < 400)
        $display("pkt %0d: fmt=%0d sub=%0d addr=%h stop=%0d nbits=%0d branch=%0d thaddr=%0d raw=%h",
                 i, dp[i].fmt, dp[i].sub, dp[i].addr, dp[i].stop, dp[i].nbits, dp[i].branch,
                 dp[i].thaddr, pkts[i][127:0]);
    end
    if (dp.size() == 0 || dp[0].fmt != 3 || dp[0].sub != 0) return 1;
    pc = dp[0].addr; sbit = dp[0].branch; sbit_v = 1;
    c_start++;
    k = 1; gi = 0; pend_v = 0; pend_stop = 0; pend_a = 0; finished = 0; steps = 0;
    while (!finished && steps < 10_000_000) begin
      steps++;
      // take in more packet information while nothing is outstanding
      while (q.size() == 0 && !pend_v && k < dp.size()) begin
        if (dp[k].fmt == 1 || dp[k].fmt == 2) begin
          for (int i = 0; i < dp[k].nbits; i++) q.push_back(dp[k].bits[i]);
          if (dp[k].has_addr) begin
            pend_v = 1; pend_a = dp[k].addr; pend_stop = dp[k].stop;
            if (pend_stop) c_stop++; else c_arrival++;
          end else c_fullmap++;
          k++;
        end else if (dp[k].fmt == 3 && dp[k].sub == 0) begin
          if (pc == dp[k].addr) begin
            sbit = dp[k].branch; sbit_v = 1; k++; c_resync++;
            continue;                       // R may be a jump whose target follows
          end
          break;
        end else if (dp[k].fmt == 3 && dp[k].sub == 1 && !dp[k].thaddr) begin
          pend_v = 1; pend_a = dp[k].stop_addr; pend_stop = 1;
          break;
        end else break;
      end
      // execute the instruction at pc
      if (!addr2idx.exists(pc)) begin
        $display("DECODE: pc %h outside the program", pc);
        return errors + 1;
      end
      idx = addr2idx[pc];
      if (gi >= golden.size() || golden[gi] != pc) begin
        $display("DECODE: step %0d got %h expected %h (packet %0d, %0d bits queued)", gi, pc,
                 gi < golden.size() ? golden[gi] : 0, k, q.size());
        if (dbg) for (int i = (gi > 12 ? gi - 12 : 0); i < gi; i++) $display("  golden %0d: %h", i, golden[i]);
        return errors + 1;
      end
      if (dbg) $display("  step %0d pc=%h packet=%0d queued=%0d pending=%0d/%0d/%h", gi, pc, k, q.size(),
                        pend_v, pend_stop, pend_a);
      gi++;
      decoded++;
      npc = pc + longint'(p_size[idx]);
      case (p_kind[idx])
        K_BR: begin
          if (sbit_v) b = sbit;
          else if (q.size() != 0) b = q.pop_front();
          else begin
            $display("DECODE: no branch bit at %h", pc);
            return errors + 1;
          end
          taken = !b;
          if (taken) npc = p_addr[p_tgt[idx]];
        end
        K_IJ: npc = p_addr[p_tgt[idx]];
        K_UJ: begin
          if (pend_v && !pend_stop) begin   // bits still queued belong to the target
            npc = pend_a; pend_v = 0;
          end else if (!(pend_v && pend_stop && pc == pend_a)) begin
            $display("DECODE: no target for uninferable jump at %h", pc);
            return errors + 1;
          end
        end
        default: ;
      endcase
      sbit_v = 0;
      // a stop report without branch bits may name the instruction just run
      if (!pend_v && q.size() == 0 && k < dp.size() && p_kind[idx] != K_UJ) begin
        if (dp[k].fmt == 2 && dp[k].stop && dp[k].addr == pc) begin
          pend_v = 1; pend_a = pc; pend_stop = 1; c_stop++; k++;
        end else if (dp[k].fmt == 3 && dp[k].sub == 1 && !dp[k].thaddr && dp[k].stop_addr == pc) begin
          pend_v = 1; pend_a = pc; pend_stop = 1;
        end
      end
      if (pend_v && pend_stop && pc == pend_a && q.size() == 0) begin
        pend_v = 0;
        if (k >= dp.size()) begin finished = 1; break; end
        if (dp[k].fmt == 3 && dp[k].sub == 1) begin
          if (dp[k].thaddr) c_trap++; else c_trap_stop++;
          npc = dp[k].addr; sbit = dp[k].branch; sbit_v = 1; k++;
        end else if (dp[k].fmt == 3 && dp[k].sub == 3) begin
          c_support++; k++; finished = 1;
        end else begin
          $display("DECODE: stop at %h not followed by a trap or end packet", pc);
          return errors + 1;
        end
      end
      pc = npc;
    end
    if (gi != golden.size()) begin
      $display("DECODE: rebuilt %0d of %0d instructions", gi, golden.size());
      errors++;
    end
    if (k != dp.size()) begin
      $display("DECODE: %0d packets left over", dp.size() - k);
      errors++;
    end
    return errors;
  endfunction

endpackage
