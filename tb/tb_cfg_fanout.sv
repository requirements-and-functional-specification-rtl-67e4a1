// tb_cfg_fanout: self-checking test of the configuration bus fan-out.
// Drives random CDATA, CCLK, PROG_B, CE and disable masks and checks every
// output against the expected copy: data and clock on every bus, each filter
// chip's PROG_B equal to its bank's line unless masked or CE is low (then
// held high), the VSI pair on PROG[9] with its own masks, and the eight
// single chips on PROG[1..8].
module tb_cfg_fanout;
  import cfg_pkg::*;
  logic [7:0]  cdata;
  logic        cclk, chip_ena;
  logic [11:0] nprog;
  prog_dis_t   dis;
  logic [2:0][7:0] cdata_a, cdata_b;
  logic [2:0][5:0] cclk_a, prog_a, cclk_b, prog_b;
  logic [7:0] cdata_33, cdata_33b, cdata_wbc, cdata_ic, cdata_tc;
  logic [9:0] cclk_other, prog_other;
  logic cdata_oe;
  int checks = 0, failures = 0;

  cfg_fanout dut (.*);

  task automatic expect_eq(input logic [63:0] got, input logic [63:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, want);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    logic [9:0] po;
    #1;
    for (int g = 0; g < 3; g++) begin
      expect_eq(cdata_a[g], cdata, "cdata_a");
      expect_eq(cdata_b[g], cdata, "cdata_b");
      expect_eq(cclk_a[g], {6{cclk}}, "cclk_a");
      expect_eq(cclk_b[g], {6{cclk}}, "cclk_b");
      for (int c = 0; c < 6; c++) begin
        expect_eq(prog_a[g][c], (!chip_ena || dis.fil_a[6*g+c]) ? 1'b1 : nprog[10], $sformatf("prog F%0dA", 6*g+c));
        expect_eq(prog_b[g][c], (!chip_ena || dis.fil_b[6*g+c]) ? 1'b1 : nprog[11], $sformatf("prog F%0dB", 6*g+c));
      end
    end
    expect_eq({cdata_33, cdata_33b, cdata_wbc, cdata_ic, cdata_tc}, {5{cdata}}, "other cdata");
    expect_eq(cclk_other, {10{cclk}}, "cclk_other");
    po[7:0] = chip_ena ? nprog[8:1] : 8'hff;
    po[8]   = (!chip_ena || dis.vsia) ? 1'b1 : nprog[9];
    po[9]   = (!chip_ena || dis.vsib) ? 1'b1 : nprog[9];
    expect_eq(prog_other, po, "prog_other");
    expect_eq(cdata_oe, chip_ena, "cdata_oe");
  endtask

  initial begin
    // all enabled, PROG pulsed low on every line: every chip sees the pulse
    chip_ena = 1; dis = '0; cdata = 8'ha5; cclk = 0;
    nprog = '1; check_all();
    nprog = '0; check_all();
    expect_eq(prog_a, '0, "all bank A pulsed");
    // mask one chip per bank: only it stays high
    dis.fil_a[4] = 1; dis.fil_b[17] = 1; dis.vsib = 1;
    check_all();
    expect_eq(prog_a[0][4], 1'b1, "F4A masked");
    expect_eq(prog_b[2][5], 1'b1, "F17B masked");
    expect_eq(prog_other[9], 1'b1, "VSIB masked");
    expect_eq(prog_other[8], 1'b0, "VSIA not masked");
    // CE low blocks everything
    chip_ena = 0; check_all();
    for (int i = 0; i < 3000; i++) begin
      cdata = 8'($urandom); cclk = 1'($urandom); nprog = 12'($urandom);
      chip_ena = ($urandom_range(0, 3) != 0);
      dis = prog_dis_t'({$urandom, $urandom});
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
