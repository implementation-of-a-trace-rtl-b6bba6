// te_buffer: packs variable-length packets into two alternating 512-bit buffers.
//
// Each packet (header byte first, 1..32 bytes) enters the active buffer at its
// MSB end while the buffer contents shift down by the packet's byte length, so
// packets sit back to back with the oldest nearest the LSB and the newest at the
// MSB. When the active buffer holds exactly BUF_W/8 bytes it is handed to the
// sink (sink_valid pulses for one cycle, sink_data holds that buffer until the
// next hand-over) and the other buffer becomes active.
// A packet that does not fit in what is left of the active buffer is handled by
// SPLIT:
//   SPLIT = 0  zero padding: the active buffer is sent as it is, with its
//              unused low bytes zero, and the whole packet starts the other
//              buffer.
//   SPLIT = 1  the packet's low bytes fill the active buffer exactly and its
//              remaining high bytes start the other buffer.
// flush sends a partly filled buffer when no packet arrives in that cycle; it is
// used when tracing ends. With SPLIT = 0 the unused low bytes are zero, as for
// padding. With SPLIT = 1 the buffer is shifted down first, so that its bytes
// continue the previous word directly (the tail of a packet split over the two
// words stays next to its head) and the unused high bytes are zero. A receiver
// skips zero bytes where it expects a header.
// Timing: one packet accepted every cycle, no back-pressure. The buffer size,
// the two buffers, both fill policies, packets entering at the MSB end and the
// zero padding at the LSB end follow the document; the shift before a flush in
// split mode and the one-cycle valid strobe towards the sink are this design's
// choices.
module te_buffer
  import etrace_pkg::*;
#(
  parameter int unsigned BUF_W = 512,
  parameter bit          SPLIT = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,      // synchronous, active low
  input  logic             in_valid,
  input  logic [LEN_W-1:0] in_len,     // 1..OUT_MAX_BYTES
  input  logic [OUT_W-1:0] in_data,
  input  logic             flush,
  output logic             sink_valid,
  output logic [BUF_W-1:0] sink_data,
  output logic             empty,      // no bytes waiting in the active buffer
  output logic             padded      // strobe: a buffer was closed with zero padding
);

  localparam int unsigned BB    = BUF_W / 8;        // bytes per buffer
  localparam int unsigned FILLW = $clog2(BB + 1);

  logic [BUF_W-1:0] buf_q [2];
  logic             act_q;                         // active buffer
  logic [FILLW-1:0] fill_q;                        // bytes in the active buffer
  logic             out_sel_q;                     // buffer shown on sink_data

  // base content shifted down by nbytes with the packet's low nbytes on top
  function automatic logic [BUF_W-1:0] insert(logic [BUF_W-1:0] base,
                                               logic [OUT_W-1:0] pkt,
                                               int unsigned nbytes);
    logic [BUF_W-1:0] wide;
    if (nbytes == 0) return base;
    wide = BUF_W'(pkt);
    return (base >> (8 * nbytes)) | (wide << (BUF_W - 8 * nbytes));
  endfunction

  logic [BUF_W-1:0] cur_base, act_d, oth_d;
  logic             act_we, oth_we, close, swap, pad_d;
  logic [FILLW-1:0] fill_d;

  always_comb begin
    int unsigned f, l, k;
    f        = int'(fill_q);
    l        = int'(in_len);
    k        = BB - f;
    cur_base = (fill_q == 0) ? '0 : buf_q[act_q];
    act_d    = cur_base;
    oth_d    = '0;
    act_we   = 1'b0;
    oth_we   = 1'b0;
    close    = 1'b0;
    pad_d    = 1'b0;
    fill_d   = fill_q;
    if (in_valid) begin
      if (f + l < BB) begin
        act_d  = insert(cur_base, in_data, l);
        act_we = 1'b1;
        fill_d = FILLW'(f + l);
      end else if (f + l == BB) begin
        act_d  = insert(cur_base, in_data, l);
        act_we = 1'b1;
        close  = 1'b1;
        fill_d = '0;
      end else if (SPLIT) begin
        act_d  = insert(cur_base, in_data, k);
        act_we = 1'b1;
        oth_d  = insert('0, in_data >> (8 * k), l - k);
        oth_we = 1'b1;
        close  = 1'b1;
        fill_d = FILLW'(l - k);
      end else begin
        oth_d  = insert('0, in_data, l);
        oth_we = 1'b1;
        close  = 1'b1;
        pad_d  = 1'b1;
        fill_d = FILLW'(l);
      end
    end else if (flush && fill_q != 0) begin
      // with splitting, the bytes must continue the previous word directly
      act_d  = SPLIT ? (cur_base >> (8 * k)) : cur_base;
      act_we = SPLIT;
      close  = 1'b1;
      pad_d  = 1'b1;
      fill_d = '0;
    end
    swap = close;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buf_q[0]   <= '0;
      buf_q[1]   <= '0;
      act_q      <= 1'b0;
      fill_q     <= '0;
      out_sel_q  <= 1'b0;
      sink_valid <= 1'b0;
      padded     <= 1'b0;
    end else begin
      if (act_we) buf_q[act_q]  <= act_d;
      if (oth_we) buf_q[!act_q] <= oth_d;
      fill_q     <= fill_d;
      sink_valid <= close;
      padded     <= pad_d;
      if (swap) begin
        out_sel_q <= act_q;
        act_q     <= !act_q;
      end
    end
  end

  assign sink_data = buf_q[out_sel_q];
  assign empty     = (fill_q == 0);

  // a full buffer never stays in the active slot
  a_fill_range: assert property (@(posedge clk) disable iff (!rst_n) fill_q < FILLW'(BB));

endmodule
