// tb_axi_slave_fsm: self-checking test of the common AXI4-Lite slave state
// machines. A 16-word memory in the testbench answers the device calls after
// a programmable number of wait cycles. Random reads and writes check the
// data, the OK responses, that each transfer calls the device exactly once,
// the read-done (bit 0) and write-done (bit 1) interrupt pulses, and the
// cycle count: 3 cycles for a read and 4 for a write as seen by the master
// when the device answers at once, plus the device's wait cycles.
module tb_axi_slave_fsm;
  import axi4l_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ch_m_t axi_m;
  ch_s_t axi_s;
  logic        rd_req, rd_ok, wr_req, wr_ok;
  logic [31:0] rd_addr, rd_data, wr_addr, wr_data;
  logic [3:0]  wr_strb;

  axi_master_bfm bfm (.clk, .m(axi_m), .s(axi_s));

  axi_slave_fsm dut (
    .clk, .rst_n, .axi_m, .axi_s,
    .dev_rd_req(rd_req), .dev_rd_addr(rd_addr), .dev_rd_ok(rd_ok), .dev_rd_data(rd_data),
    .dev_wr_req(wr_req), .dev_wr_addr(wr_addr), .dev_wr_data(wr_data), .dev_wr_strb(wr_strb),
    .dev_wr_ok(wr_ok), .dev_intr(32'd0)
  );

  // device model
  logic [31:0] mem [16];
  int rd_wait = 0, wr_wait = 0, rd_cnt = 0, wr_cnt = 0;
  int rd_calls = 0, wr_calls = 0, rd_intr = 0, wr_intr = 0;
  assign rd_ok   = rd_req && (rd_cnt >= rd_wait);
  assign rd_data = mem[rd_addr[5:2]];
  assign wr_ok   = wr_req && (wr_cnt >= wr_wait);

  always @(posedge clk) begin
    if (rd_req && !rd_ok) rd_cnt <= rd_cnt + 1; else rd_cnt <= 0;
    if (wr_req && !wr_ok) wr_cnt <= wr_cnt + 1; else wr_cnt <= 0;
    if (rd_req && rd_ok) rd_calls <= rd_calls + 1;
    if (wr_req && wr_ok) begin
      wr_calls <= wr_calls + 1;
      for (int b = 0; b < 4; b++)
        if (wr_strb[b]) mem[wr_addr[5:2]][8*b +: 8] <= wr_data[8*b +: 8];
    end
    if (rst_n && axi_s.intr[0]) rd_intr <= rd_intr + 1;
    if (rst_n && axi_s.intr[1]) wr_intr <= wr_intr + 1;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [31:0] model [16];

  initial begin
    logic [31:0] d, a, v;
    logic [3:0]  st;
    resp_e r;
    int cyc, n_rd, n_wr;
    for (int i = 0; i < 16; i++) begin
      mem[i] = 32'h1000 + i;
      model[i] = 32'h1000 + i;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    n_rd = 0; n_wr = 0;
    for (int t = 0; t < 200; t++) begin
      a = {26'($urandom), 6'd0} | 32'(($urandom % 16) << 2);
      if ($urandom % 2) begin
        rd_wait = (t < 20) ? 0 : $urandom % 4;
        bfm.read(a, d, r, cyc);
        n_rd++;
        check(d == model[a[5:2]], $sformatf("read %h got %h exp %h", a, d, model[a[5:2]]));
        check(r == RSP_OK, "read resp");
        check(cyc == 3 + rd_wait, $sformatf("read cycles %0d exp %0d", cyc, 3 + rd_wait));
      end else begin
        wr_wait = (t < 20) ? 0 : $urandom % 4;
        v  = $urandom;
        st = (t % 3 == 0) ? 4'($urandom) : 4'hF;
        bfm.write(a, v, st, r, cyc);
        n_wr++;
        for (int b = 0; b < 4; b++) if (st[b]) model[a[5:2]][8*b +: 8] = v[8*b +: 8];
        check(r == RSP_OK, "write resp");
        check(cyc == 4 + wr_wait, $sformatf("write cycles %0d exp %0d", cyc, 4 + wr_wait));
      end
    end
    repeat (5) @(posedge clk);
    for (int i = 0; i < 16; i++) check(mem[i] == model[i], $sformatf("mem[%0d]", i));
    check(rd_calls == n_rd, $sformatf("device read calls %0d exp %0d", rd_calls, n_rd));
    check(wr_calls == n_wr, $sformatf("device write calls %0d exp %0d", wr_calls, n_wr));
    check(rd_intr == n_rd, $sformatf("read interrupts %0d exp %0d", rd_intr, n_rd));
    check(wr_intr == n_wr, $sformatf("write interrupts %0d exp %0d", wr_intr, n_wr));
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
