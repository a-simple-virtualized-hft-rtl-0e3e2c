// Testbench for page_table: ready must rise after the 16384-entry clearing
// sweep with every entry invalid; then both write ports install entries and
// both read ports return them one clock later.
`timescale 1ns/1ps
module tb_page_table;
  logic clk = 0;
  always #5 clk = ~clk;
  `include "tb_check.svh"
  `TB_WATCHDOG(60000)

  logic        rst_n, we0, we1, ready;
  logic [13:0] ra0, ra1, wa0, wa1;
  logic [14:0] rd0, rd1, wd0, wd1;
  logic [14:0] model [int];
  int          t;

  page_table dut (.clk, .rst_n, .raddr0(ra0), .rdata0(rd0), .raddr1(ra1), .rdata1(rd1),
    .we0, .waddr0(wa0), .wdata0(wd0), .we1, .waddr1(wa1), .wdata1(wd1), .ready);

  initial begin
    rst_n = 0; we0 = 0; we1 = 0; ra0 = 0; ra1 = 0; wa0 = 0; wa1 = 0; wd0 = 0; wd1 = 0; t = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    while (!ready) begin @(negedge clk); t++; end
    `CHECK(t >= 16384 && t <= 16386, "clearing sweep length")
    for (int i = 0; i < 16384; i += 2) begin
      ra0 = 14'(i); ra1 = 14'(i + 1); @(negedge clk);
      `CHECK(rd0 == 0 && rd1 == 0, "cleared entry")
    end
    for (int n = 0; n < 3000; n++) begin
      we0 = 1; we1 = 1; wa0 = 14'($urandom); wa1 = 14'($urandom);
      if (wa1 == wa0) wa1 = wa0 + 14'd1;
      wd0 = 15'($urandom); wd1 = 15'($urandom);
      model[wa0] = wd0; model[wa1] = wd1;
      @(negedge clk);
      we0 = 0; we1 = 0;
      ra0 = wa0; ra1 = wa1; @(negedge clk);
      `CHECK(rd0 == model[ra0] && rd1 == model[ra1], "written entries")
    end
    `TB_FINISH
  end
endmodule
