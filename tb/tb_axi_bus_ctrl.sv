// tb_axi_bus_ctrl: self-checking test of the AXI4-Lite interconnect with one
// master and three slaves. Each slave is a common slave state machine with a
// 16-word memory behind it, preloaded with {slave, word} patterns. The test
// checks that reads and writes reach the slave chosen by address bits
// [19:12] (indices of 3 and above alias to slave 2), that a read and a write
// to different slaves can run at the same time, that slaves not addressed see
// only zeros, that each slave's interrupt byte shows up in its own byte of
// the master's interrupt word, and the transfer cycle counts (3 per read and
// 4 per write, the interconnect adding none).
module tb_axi_bus_ctrl;
  import axi4l_pkg::*;

  localparam int SC = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ch_m_t m_m [1];
  ch_s_t m_s [1];
  ch_m_t s_m [SC];
  ch_s_t s_s [SC];
  ch_m_t bfm_m;

  axi_master_bfm bfm (.clk, .m(bfm_m), .s(m_s[0]));
  assign m_m[0] = bfm_m;

  axi_bus_ctrl #(.MC(1), .SC(SC)) dut (
    .clk, .rst_n, .m_ch_m(m_m), .m_ch_s(m_s), .s_ch_m(s_m), .s_ch_s(s_s)
  );

  logic [31:0] mem [SC][16];
  int          wr_calls [SC];
  int          stray = 0;           // inputs seen by a slave that was not addressed
  int          intr_seen [SC];

  for (genvar k = 0; k < SC; k++) begin : g_sl
    logic        rd_req, wr_req;
    logic [31:0] rd_addr, wr_addr, wr_data;
    logic [3:0]  wr_strb;
    axi_slave_fsm u (
      .clk, .rst_n, .axi_m(s_m[k]), .axi_s(s_s[k]),
      .dev_rd_req(rd_req), .dev_rd_addr(rd_addr), .dev_rd_ok(1'b1),
      .dev_rd_data(mem[k][rd_addr[5:2]]),
      .dev_wr_req(wr_req), .dev_wr_addr(wr_addr), .dev_wr_data(wr_data), .dev_wr_strb(wr_strb),
      .dev_wr_ok(1'b1), .dev_intr(32'(k + 1) << 4)
    );
    always @(posedge clk) if (rst_n) begin
      if (wr_req) begin
        mem[k][wr_addr[5:2]] <= wr_data;
        wr_calls[k] <= wr_calls[k] + 1;
      end
      if (m_s[0].intr[8*k +: 8] == s_s[k].intr[7:0] && s_s[k].intr[5:4] == 2'(k + 1))
        intr_seen[k] <= intr_seen[k] + 1;
    end
  end

  // slave index the model expects for an address
  function automatic int sel(input logic [31:0] a);
    int i = int'(a[19:12]);
    return (i >= SC) ? SC - 1 : i;
  endfunction

  // watch for stray channel activity on unaddressed slaves
  int cur_r = -1, cur_w = -1;
  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < SC; k++) begin
      if (s_m[k].raddr_valid && k != cur_r) stray++;
      if (s_m[k].waddr_valid && k != cur_w) stray++;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [31:0] model [SC][16];
  int exp_wr [SC];

  initial begin
    logic [31:0] a, a2, d, v;
    resp_e r, r2;
    int cyc, cyc2, k, k2;
    for (int s = 0; s < SC; s++) begin
      exp_wr[s] = 0;
      wr_calls[s] = 0;
      intr_seen[s] = 0;
      for (int i = 0; i < 16; i++) begin
        mem[s][i]   = {8'(s), 16'h0, 8'(i)};
        model[s][i] = {8'(s), 16'h0, 8'(i)};
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 150; t++) begin
      a = {12'h000, 8'($urandom % 6), 6'($urandom), 6'(($urandom % 16) << 2)};
      a[1:0] = 2'b00;
      k = sel(a);
      if (t % 3 == 0) begin
        cur_r = k;
        bfm.read(a, d, r, cyc);
        cur_r = -1;
        check(d == model[k][a[5:2]], $sformatf("read %h got %h exp %h", a, d, model[k][a[5:2]]));
        check(cyc == 3, $sformatf("read cycles %0d", cyc));
      end else if (t % 3 == 1) begin
        v = $urandom;
        cur_w = k;
        bfm.write(a, v, 4'hF, r, cyc);
        cur_w = -1;
        model[k][a[5:2]] = v;
        exp_wr[k]++;
        check(r == RSP_OK && cyc == 4, $sformatf("write cycles %0d", cyc));
      end else begin
        // read and write at the same time, to two different slaves
        a2 = a;
        a2[13:12] = 2'((k + 1) % SC);
        k2 = sel(a2);
        v = $urandom;
        cur_r = k; cur_w = k2;
        fork
          bfm.read(a, d, r, cyc);
          bfm.write(a2, v, 4'hF, r2, cyc2);
        join
        cur_r = -1; cur_w = -1;
        check(d == model[k][a[5:2]], $sformatf("parallel read %h got %h", a, d));
        model[k2][a2[5:2]] = v;
        exp_wr[k2]++;
        check(cyc == 3 && cyc2 == 4, $sformatf("parallel cycles %0d %0d", cyc, cyc2));
      end
    end
    repeat (5) @(posedge clk);
    for (int s = 0; s < SC; s++) begin
      for (int i = 0; i < 16; i++) check(mem[s][i] == model[s][i], $sformatf("mem[%0d][%0d]", s, i));
      check(wr_calls[s] == exp_wr[s], $sformatf("writes at slave %0d: %0d exp %0d", s, wr_calls[s], exp_wr[s]));
      check(intr_seen[s] > 100, $sformatf("interrupt byte of slave %0d", s));
    end
    check(stray == 0, $sformatf("%0d stray address cycles on unaddressed slaves", stray));
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
