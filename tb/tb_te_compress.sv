// tb_te_compress: self-checking test of sign compression and the header byte.
//
// Sends raw packets of random content whose sign-extension point is chosen at
// random (so every byte count 1..31 occurs, with positive and negative signs),
// one per cycle with random gaps, and compares each output one cycle later with
// a reference worked out here by a plain linear scan from the top byte down:
// the byte count, the header (length in bits 4:0, zeros above), the kept bytes,
// zeros above them, and that sign-extending the kept bytes gives back the packet.
module tb_te_compress;
  import etrace_pkg::*;

  logic             clk = 0;
  logic             rst_n = 0;
  logic             in_valid = 0;
  logic [PKT_W-1:0] in_pkt = '0;
  logic             out_valid;
  logic [LEN_W-1:0] out_len;
  logic [OUT_W-1:0] out_data;

  te_compress dut (.clk, .rst_n, .in_valid, .in_pkt, .out_valid, .out_len, .out_data);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int seen_len[32];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // fewest bytes n such that the packet is the sign extension of its low n bytes
  function automatic int ref_bytes(logic [PKT_W-1:0] p);
    int n;
    n = PKT_MAX_BYTES;
    while (n > 1) begin
      logic ok;
      ok = 1'b1;
      for (int i = 8 * (n - 1) - 1; i < PKT_W; i++)
        if (p[i] != p[8 * (n - 1) - 1]) ok = 1'b0;
      if (!ok) break;
      n--;
    end
    return n;
  endfunction

  function automatic logic [PKT_W-1:0] random_pkt();
    logic [PKT_W-1:0] p;
    int top;
    for (int i = 0; i < PKT_W / 32 + 1; i++) p[32*i +: 32] = $urandom();
    top = $urandom_range(0, PKT_W - 1);           // last bit that is not sign
    for (int i = top + 1; i < PKT_W; i++) p[i] = p[top];
    return p;
  endfunction

  logic [PKT_W-1:0] exp_q[$];
  int               sent = 0, got = 0;

  // check each output against the packet sent one cycle earlier
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      logic [PKT_W-1:0] p, back;
      int n;
      p = exp_q.pop_front();
      n = ref_bytes(p);
      got++;
      seen_len[n]++;
      check(int'(out_len) == n + 1, $sformatf("length %0d expected %0d", out_len, n + 1));
      check(out_data[4:0] == 5'(n) && out_data[7:5] == 3'b000, "header byte");
      for (int b = 0; b < 31; b++)
        if (b < n) check(out_data[8 + 8*b +: 8] == p[8*b +: 8], "kept byte");
        else       check(out_data[8 + 8*b +: 8] == 8'h00, "zero above the kept bytes");
      for (int i = 0; i < PKT_W; i++)
        back[i] = (i < 8 * n) ? out_data[8 + i] : out_data[8 + 8 * n - 1];
      check(back == p, "sign extension restores the packet");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // fixed corner cases, then random packets
    for (int i = 0; i < 3000; i++) begin
      logic [PKT_W-1:0] p;
      case (i)
        0: p = '0;
        1: p = '1;
        2: p = PKT_W'(8'h7F);
        3: p = PKT_W'(8'h80);
        4: p = {1'b0, {(PKT_W-1){1'b1}}};
        5: p = {1'b1, {(PKT_W-1){1'b0}}};
        default: p = random_pkt();
      endcase
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      in_pkt   = p;
      if (in_valid) begin
        exp_q.push_back(p);
        sent++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    check(got == sent, $sformatf("one output per input (%0d sent, %0d out)", sent, got));
    for (int n = 1; n <= 31; n++)
      check(seen_len[n] > 0, $sformatf("a packet of %0d bytes occurred", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
