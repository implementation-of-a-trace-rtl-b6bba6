// te_compress: sign-based packet compression and header insertion.
//
// A raw packet arrives sign-extended to PKT_W bits (its top field's MSB copied
// into every unused bit above it). Whole bytes that only repeat the sign are
// dropped from the MSB side: the payload keeps the fewest bytes n (1..31) such
// that every bit from bit 8n-1 upward is equal, so a receiver restores the packet
// by sign-extending the MSB of its last byte. n is found by a five-step binary
// search over the byte count (the "fits in n bytes" test is monotonic in n),
// which is the structure the document describes for finding the byte length.
//
// A one-byte header is then placed at the LSB side:
//   hdr[4:0] payload length in bytes, hdr[5] timestamp present (always 0,
//   timestamps are not generated), hdr[7:6] zero.
// Output: out_data[7:0] = header, out_data[8n+7:8] = payload, zeros above;
// out_len = n + 1 bytes. The header fields' positions are this design's choice.
//
// Timing: one packet per cycle, one register stage (out_* valid the cycle after
// in_valid).
module te_compress
  import etrace_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,     // synchronous, active low
  input  logic             in_valid,
  input  logic [PKT_W-1:0] in_pkt,
  output logic             out_valid,
  output logic [LEN_W-1:0] out_len,   // bytes including the header
  output logic [OUT_W-1:0] out_data
);

  // fits(n): bits [PKT_W-1 : 8n-1] are all equal
  function automatic logic fits(logic [PKT_W-1:0] p, int unsigned n);
    logic [PKT_W-1:0] ext;
    int unsigned      msb;
    msb = 8 * n - 1;
    // sign-extend from bit msb and compare with the packet
    for (int unsigned i = 0; i < PKT_W; i++)
      ext[i] = (i <= msb) ? p[i] : p[msb];
    return ext == p;
  endfunction

  logic [4:0]       nbytes;    // 1..31
  logic [PKT_W-1:0] payload;

  always_comb begin
    int unsigned lo, hi, mid;
    lo = 1;
    hi = PKT_MAX_BYTES;
    for (int step = 0; step < 5; step++) begin
      mid = (lo + hi) / 2;
      if (lo < hi) begin
        if (fits(in_pkt, mid)) hi = mid;
        else                   lo = mid + 1;
      end
    end
    nbytes = 5'(lo);
    // keep only the first nbytes bytes
    for (int unsigned b = 0; b < PKT_MAX_BYTES; b++)
      payload[8*b +: 8] = (b < lo) ? in_pkt[8*b +: 8] : 8'h00;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_len   <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_len  <= LEN_W'(nbytes) + LEN_W'(1);
        out_data <= {payload, 3'b000, 5'(nbytes)};
      end
    end
  end

endmodule
