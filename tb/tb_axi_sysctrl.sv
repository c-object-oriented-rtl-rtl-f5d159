// tb_axi_sysctrl: self-checking test of the system control peripheral
// (timer and GPIO) through its AXI4-Lite port.
// Checks: register 0 follows the PORTA input and ignores writes; the
// general-purpose registers 5..15 store strobed bytes; every read takes 3
// cycles; the timer counts while enabled, restarts after reaching the
// compare value (period compare+1 cycles), sets the status bit, raises
// interrupt bit 2 once per period only while its interrupt enable is set,
// and stops when disabled.
module tb_axi_sysctrl;
  import axi4l_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ch_m_t       axi_m;
  ch_s_t       axi_s;
  logic [31:0] porta;

  axi_master_bfm bfm (.clk, .m(axi_m), .s(axi_s));
  axi_sysctrl dut (.clk, .rst_n, .axi_m, .axi_s, .porta);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // timer interrupt pulses and their spacing
  int n_tint = 0, last_t = -1, period = 0, cyc_now = 0;
  always @(posedge clk) begin
    cyc_now <= cyc_now + 1;
    if (rst_n && axi_s.intr[2]) begin
      n_tint <= n_tint + 1;
      if (last_t >= 0) period <= cyc_now - last_t;
      last_t <= cyc_now;
    end
  end

  logic [31:0] model [16];

  initial begin
    logic [31:0] d, v, c1, c2;
    logic [3:0]  st;
    resp_e r;
    int cyc, idx, n0;
    porta = 32'h0;
    for (int i = 0; i < 16; i++) model[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // GPIO port A
    for (int t = 0; t < 8; t++) begin
      porta = $urandom;
      bfm.read(32'h2000, d, r, cyc);
      check(d == porta, $sformatf("porta read %h exp %h", d, porta));
      check(cyc == 3 && r == RSP_OK, $sformatf("read cycles %0d", cyc));
    end
    bfm.write(32'h2000, 32'hFFFF_FFFF, 4'hF, r, cyc);
    porta = 32'h1234_5678;
    bfm.read(32'h2000, d, r, cyc);
    check(d == 32'h1234_5678, "porta register is read only");

    // general-purpose registers with strobes
    for (int t = 0; t < 60; t++) begin
      idx = 5 + ($urandom % 11);
      if ($urandom % 2) begin
        v  = $urandom;
        st = 4'($urandom);
        bfm.write(32'(idx << 2), v, st, r, cyc);
        for (int b = 0; b < 4; b++) if (st[b]) model[idx][8*b +: 8] = v[8*b +: 8];
        check(cyc == 4, $sformatf("write cycles %0d", cyc));
      end else begin
        bfm.read(32'(idx << 2), d, r, cyc);
        check(d == model[idx], $sformatf("reg %0d = %h exp %h", idx, d, model[idx]));
      end
    end

    // timer: compare 19, enable with interrupt
    bfm.write(32'hC, 32'd19, 4'hF, r, cyc);
    bfm.write(32'h4, 32'd3, 4'hF, r, cyc);
    bfm.read(32'h8, c1, r, cyc);
    bfm.read(32'h8, c2, r, cyc);
    check(c1 <= 19 && c2 <= 19 && c2 != c1, $sformatf("timer counting %0d %0d", c1, c2));
    repeat (200) @(posedge clk);
    check(n_tint >= 9 && n_tint <= 11, $sformatf("%0d timer interrupts in ~210 cycles", n_tint));
    check(period == 20, $sformatf("timer period %0d", period));
    bfm.read(32'h10, d, r, cyc);
    check(d[0] == 1'b1, "timer status bit");

    // interrupt disabled: no pulses, timer still runs
    bfm.write(32'h4, 32'd1, 4'hF, r, cyc);
    bfm.write(32'h10, 32'd0, 4'hF, r, cyc);
    n0 = n_tint;
    repeat (100) @(posedge clk);
    check(n_tint == n0, "no interrupt while disabled");
    bfm.read(32'h10, d, r, cyc);
    check(d[0] == 1'b1, "status bit set again without interrupt");

    // timer stopped
    bfm.write(32'h4, 32'd0, 4'hF, r, cyc);
    bfm.read(32'h8, c1, r, cyc);
    repeat (30) @(posedge clk);
    bfm.read(32'h8, c2, r, cyc);
    check(c1 == c2, "timer holds when disabled");

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
