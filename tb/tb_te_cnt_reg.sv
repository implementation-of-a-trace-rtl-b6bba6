// tb_te_cnt_reg: self-checking test of the APB control registers.
//
// Drives APB transfers (setup phase, then access phase) and compares every read
// and every configuration output with a small model of the register set kept in
// the testbench: reset values, the read-only trTeImpl and constant fields,
// trTeEmpty following its input, fields held at reset while trTeActive is 0,
// trTeInstTracing only taking effect with trTeEnable, the encoder reset output,
// unmapped offsets, and random write/read sequences. Each transfer must take
// exactly two cycles (pready high in the access phase, pslverr low).
module tb_te_cnt_reg;
  import etrace_pkg::*;

  logic        clk = 0;
  logic        rst_n = 0;
  logic        psel = 0, penable = 0, pwrite = 0;
  logic [11:0] paddr = '0;
  logic [31:0] pwdata = '0;
  logic [31:0] prdata;
  logic        pready, pslverr;
  logic        te_empty = 1'b1;
  logic        enc_rst_n;
  te_cfg_t     cfg;

  te_cnt_reg dut (
    .clk, .rst_n, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready,
    .pslverr, .te_empty, .enc_rst_n, .cfg
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

  // reference model
  bit       m_active, m_enable, m_tracing, m_noaddrdiff;
  bit [1:0] m_syncmode;
  bit [3:0] m_syncmax;

  function automatic void model_write(logic [11:0] a, logic [31:0] d);
    if (a == 12'h000) begin
      if (m_active && d[0]) begin
        m_enable   = d[1];
        m_tracing  = d[1] & d[2];
        m_syncmode = d[17:16];
        m_syncmax  = d[23:20];
      end else begin
        m_enable = 0; m_tracing = 0; m_syncmode = 0; m_syncmax = 0; m_noaddrdiff = 0;
      end
      m_active = d[0];
    end else if (a == 12'h008 && m_active) begin
      m_noaddrdiff = d[0];
    end
  endfunction

  function automatic logic [31:0] model_read(logic [11:0] a);
    logic [31:0] r;
    r = '0;
    case (a)
      12'h000: begin
        r[0] = m_active; r[1] = m_enable; r[2] = m_tracing; r[3] = te_empty;
        r[6:4] = 3'd3; r[17:16] = m_syncmode; r[23:20] = m_syncmax;
      end
      12'h004: r = 32'h1;
      12'h008: r[0] = m_noaddrdiff;
      default: r = '0;
    endcase
    return r;
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic apb_write(logic [11:0] a, logic [31:0] d);
    int c0;
    @(posedge clk);
    c0 = cyc;
    psel <= 1; penable <= 0; pwrite <= 1; paddr <= a; pwdata <= d;
    @(posedge clk);
    penable <= 1;
    #1 check(pready === 1'b1 && pslverr === 1'b0, "write: pready high, no error in access phase");
    @(posedge clk);
    check(cyc - c0 == 2, "write transfer takes two cycles");
    psel <= 0; penable <= 0; pwrite <= 0;
    model_write(a, d);
  endtask

  task automatic apb_read(logic [11:0] a, output logic [31:0] d);
    @(posedge clk);
    psel <= 1; penable <= 0; pwrite <= 0; paddr <= a;
    @(posedge clk);
    penable <= 1;
    #1 d = prdata;
    check(pready === 1'b1 && pslverr === 1'b0, "read: pready high, no error in access phase");
    @(posedge clk);
    psel <= 0; penable <= 0;
  endtask

  task automatic read_check(logic [11:0] a, string what);
    logic [31:0] r, e;
    apb_read(a, r);
    e = model_read(a);
    check(r == e, $sformatf("%s: read %h at %h, expected %h", what, r, a, e));
  endtask

  task automatic outputs_check(string what);
    #1;
    check(enc_rst_n == m_active, {what, ": enc_rst_n follows trTeActive"});
    check(cfg.tracing == (m_active & m_enable & m_tracing), {what, ": tracing output"});
    check(cfg.full_addr == m_noaddrdiff, {what, ": full address mode output"});
    check(cfg.syncmode == syncmode_e'(m_syncmode), {what, ": syncmode output"});
    check(cfg.syncmax == m_syncmax, {what, ": syncmax output"});
  endtask

  logic [31:0] r;
  logic [11:0] addrs[4] = '{12'h000, 12'h004, 12'h008, 12'h00C};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // reset values
    read_check(12'h000, "reset trTeControl");
    read_check(12'h004, "trTeImpl");
    read_check(12'h008, "reset trTeInstFeatures");
    outputs_check("after reset");

    // writes while inactive are ignored
    apb_write(12'h000, 32'h00F3_0006);
    read_check(12'h000, "fields held while trTeActive=0");
    apb_write(12'h008, 32'h1);
    read_check(12'h008, "features held while trTeActive=0");
    outputs_check("inactive");

    // bring-up sequence
    apb_write(12'h000, 32'h1);
    read_check(12'h000, "active");
    apb_write(12'h000, 32'h0052_0001);
    apb_write(12'h008, 32'h1);
    read_check(12'h008, "full address mode set");
    apb_write(12'h000, 32'h0052_0005);            // tracing without enable
    read_check(12'h000, "instTracing needs trTeEnable");
    outputs_check("not enabled");
    apb_write(12'h000, 32'h0052_0003);
    apb_write(12'h000, 32'h0052_0007);
    read_check(12'h000, "tracing");
    outputs_check("tracing");
    check(cfg.tracing == 1'b1, "tracing is on after bring-up");

    // read-only fields and trTeEmpty
    apb_write(12'h004, 32'hFFFF_FFFF);
    read_check(12'h004, "trTeImpl read only");
    te_empty = 1'b0;
    read_check(12'h000, "trTeEmpty clear");
    te_empty = 1'b1;
    read_check(12'h000, "trTeEmpty set");
    apb_write(12'h000, 32'hFFFF_FFFF);
    read_check(12'h000, "constant fields of trTeControl");
    read_check(12'h00C, "unmapped offset reads zero");

    // back to reset through trTeActive
    apb_write(12'h000, 32'h0);
    read_check(12'h000, "trTeActive=0 resets the fields");
    read_check(12'h008, "trTeActive=0 resets the features");
    outputs_check("reset by trTeActive");

    // random sequences
    for (int i = 0; i < 300; i++) begin
      logic [31:0] d;
      logic [11:0] a;
      a = addrs[$urandom_range(0, 3)];
      d = $urandom();
      if ($urandom_range(0, 3) == 0) d[0] = 1'b1;
      te_empty = $urandom_range(0, 1);
      if ($urandom_range(0, 1) == 0) apb_write(a, d);
      else read_check(a, "random read");
      outputs_check("random");
    end

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
