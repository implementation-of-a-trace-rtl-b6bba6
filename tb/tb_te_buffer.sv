// tb_te_buffer: self-checking test of the dual 512-bit output buffer.
//
// Two instances at the default buffer width, one per fill policy (SPLIT = 1
// splits a packet over two buffers, SPLIT = 0 closes the buffer with zero
// padding), receive the same random packets of 1..32 bytes, back to back or
// with gaps, plus flush requests (honoured only in cycles without a packet).
// A byte-level model in the testbench builds the words each policy must send
// (zero padding at the LSB end with SPLIT = 0, at the MSB end of the last word
// with SPLIT = 1);
// every word the buffers hand over is compared with it, together with the
// padding strobe and the timing: a word is on sink_data, with sink_valid high,
// exactly one cycle after the packet or flush that closed it was accepted, and
// for one cycle only.
module tb_te_buffer;
  import etrace_pkg::*;

  localparam int BUF_W = 512;
  localparam int BB    = BUF_W / 8;

  logic             clk = 0;
  logic             rst_n = 0;
  logic             in_valid = 0;
  logic [LEN_W-1:0] in_len = '0;
  logic [OUT_W-1:0] in_data = '0;
  logic             flush = 0;
  logic             sv[2], pad[2], emp[2];
  logic [BUF_W-1:0] sd[2];

  te_buffer #(.BUF_W(BUF_W), .SPLIT(1'b0)) u_pad (
    .clk, .rst_n, .in_valid, .in_len, .in_data, .flush,
    .sink_valid(sv[0]), .sink_data(sd[0]), .empty(emp[0]), .padded(pad[0])
  );
  te_buffer #(.BUF_W(BUF_W), .SPLIT(1'b1)) u_split (
    .clk, .rst_n, .in_valid, .in_len, .in_data, .flush,
    .sink_valid(sv[1]), .sink_data(sd[1]), .empty(emp[1]), .padded(pad[1])
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- model
  typedef struct {
    logic [BUF_W-1:0] word;
    bit               padded;
    int               cycle;    // cycle in which sink_valid must be seen
  } exp_t;

  byte unsigned cur[2][$];
  exp_t         expq[2][$];
  int           n_split = 0, n_pad = 0, n_flush = 0, n_words[2] = '{0, 0};

  function automatic void emit(int s, bit padded, int cyc_now);
    exp_t e;
    e.word = '0;
    // split mode: bytes from the LSB up; zero padding: bytes end at the MSB
    for (int i = 0; i < BB; i++)
      if (s == 1) e.word[8*i +: 8] = (i < cur[s].size()) ? cur[s][i] : 8'h00;
      else        e.word[8*i +: 8] = (i >= BB - cur[s].size()) ? cur[s][i - (BB - cur[s].size())] : 8'h00;
    e.padded = padded;
    e.cycle  = cyc_now;
    expq[s].push_back(e);
    cur[s].delete();
  endfunction

  function automatic void model_packet(byte unsigned p[$], int cyc_now);
    // SPLIT = 1
    if (cur[1].size() + p.size() > BB) n_split++;
    foreach (p[i]) begin
      cur[1].push_back(p[i]);
      if (cur[1].size() == BB) emit(1, 0, cyc_now);
    end
    // SPLIT = 0
    if (cur[0].size() + p.size() > BB) begin
      emit(0, 1, cyc_now);
      n_pad++;
    end
    foreach (p[i]) cur[0].push_back(p[i]);
    if (cur[0].size() == BB) emit(0, 0, cyc_now);
  endfunction

  function automatic void model_flush(int cyc_now);
    for (int s = 0; s < 2; s++)
      if (cur[s].size() != 0) begin
        emit(s, 1, cyc_now);
        n_flush++;
      end
  endfunction

  // ---------------------------------------------------------------- checker
  int cyc = 0;
  always @(posedge clk) begin
    for (int s = 0; s < 2; s++) begin
      if (sv[s]) begin
        exp_t e;
        n_words[s]++;
        if (expq[s].size() == 0) check(0, $sformatf("SPLIT=%0d: unexpected word", s));
        else begin
          e = expq[s].pop_front();
          check(sd[s] == e.word, $sformatf("SPLIT=%0d: word %0d content", s, n_words[s]));
          check(pad[s] == e.padded, $sformatf("SPLIT=%0d: padding strobe", s));
          check(cyc == e.cycle, $sformatf("SPLIT=%0d: word seen in cycle %0d, expected %0d",
                                          s, cyc, e.cycle));
        end
      end else if (rst_n) begin
        check(expq[s].size() == 0 || expq[s][0].cycle != cyc,
              $sformatf("SPLIT=%0d: word missing in cycle %0d", s, cyc));
      end
    end
    cyc++;
  end

  // ---------------------------------------------------------------- stimulus
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      int  l;
      bit  v, f;
      byte unsigned p[$];
      @(negedge clk);
      // bursts of back-to-back packets, then quieter stretches
      v = ((i / 200) % 2 == 0) ? 1'b1 : ($urandom_range(0, 2) == 0);
      f = ($urandom_range(0, 60) == 0);
      l = (i % 7 == 0) ? 32 : $urandom_range(1, 32);
      in_valid = v;
      flush    = f;
      in_len   = LEN_W'(l);
      in_data  = '0;
      p.delete();
      for (int b = 0; b < l; b++) begin
        in_data[8*b +: 8] = 8'($urandom_range(1, 255));
        p.push_back(in_data[8*b +: 8]);
      end
      // the DUT samples at the next edge; the word is visible one cycle later
      if (v) model_packet(p, cyc + 1);
      else if (f) model_flush(cyc + 1);
    end
    @(negedge clk);
    in_valid = 0;
    flush    = 1;
    model_flush(cyc + 1);
    @(negedge clk);
    flush = 0;
    repeat (4) @(posedge clk);
    #1;
    check(emp[0] && emp[1], "both buffers empty after the final flush");
    for (int s = 0; s < 2; s++)
      check(expq[s].size() == 0, $sformatf("SPLIT=%0d: %0d words never sent", s, expq[s].size()));
    check(n_split > 0, "a packet was split over two buffers");
    check(n_pad > 0, "a buffer was closed with zero padding");
    check(n_flush > 0, "a partly filled buffer was flushed");
    $display("words: pad=%0d split=%0d; splits=%0d pads=%0d flushes=%0d",
             n_words[0], n_words[1], n_split, n_pad, n_flush);
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
