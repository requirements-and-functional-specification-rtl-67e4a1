// tb_cfg_regs: self-checking test of the MCB register file.
// Acts as the MCB bus master (single-cycle accesses on the rising clock edge)
// and checks: reset values of all thirteen registers, FVR = 0x0001,
// read/write of RBT, CD1, CD2 and the six CC bits (bit 0 and bits 15:7 read
// 0), that writes to read-only registers and unmapped addresses change
// nothing, the bit positions of every DONE and power status field against
// independently built expected words, the PSE read strobe, the decoded
// disable masks, and that the data bus is driven only during reads.
module tb_cfg_regs;
  import cfg_pkg::*;
  logic clk = 0, rst = 1;
  logic cs = 0, rw = 1;
  logic [7:0]  addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic        rdata_oe, pse_rd;
  logic [17:0] done_a = '0, done_b = '0;
  logic [9:0]  done_other = '0;
  logic [15:0] board_id = '0;
  logic        chip_ena = 0;
  pwr_stat_t   pwr = '0;
  logic [9:0]  pse = '0;
  prog_dis_t   dis;
  int checks = 0, failures = 0;

  cfg_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [63:0] got, input logic [63:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, want);
    end
  endtask

  task automatic wr(input logic [7:0] a, input logic [15:0] d);
    @(negedge clk);
    cs = 1; rw = 0; addr = a; wdata = d;
    #1 expect_eq(rdata_oe, 0, "bus not driven on write");
    @(negedge clk);
    cs = 0; rw = 1;
  endtask

  task automatic rd(input logic [7:0] a, output logic [15:0] d);
    @(negedge clk);
    cs = 1; rw = 1; addr = a;
    #1 expect_eq(rdata_oe, 1, "bus driven on read");
    expect_eq(pse_rd, (a == 8'h0c), "pse read strobe");
    d = rdata;
    @(negedge clk);
    cs = 0;
    #1 expect_eq(rdata_oe, 0, "bus released");
  endtask

  task automatic rd_chk(input logic [7:0] a, input logic [15:0] want, input string what);
    logic [15:0] d;
    rd(a, d);
    expect_eq(d, want, what);
  endtask

  logic [15:0] v, exp_w;
  logic [15:0] model [16];

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // reset values
    rd_chk(8'h00, 16'h0001, "FVR");
    for (int a = 1; a <= 12; a++) rd_chk(8'(a), 16'h0000, $sformatf("reset value @%0h", a));
    expect_eq(dis, '0, "no chip disabled after reset");

    // read/write registers
    wr(8'h01, 16'hbeef); rd_chk(8'h01, 16'hbeef, "RBT");
    wr(8'h01, 16'h1234); rd_chk(8'h01, 16'h1234, "RBT rewritten");
    wr(8'h02, 16'hffff); rd_chk(8'h02, 16'h007e, "CC writable bits 6:1");
    wr(8'h03, 16'ha55a); rd_chk(8'h03, 16'ha55a, "CD1");
    wr(8'h04, 16'h0ff0); rd_chk(8'h04, 16'h0ff0, "CD2");
    expect_eq(dis.fil_a, {2'b11, 16'ha55a}, "bank A mask");
    expect_eq(dis.fil_b, {2'b11, 16'h0ff0}, "bank B mask");
    expect_eq({dis.vsia, dis.vsib}, 2'b11, "VSI masks");
    wr(8'h02, 16'h0022);   // ADIS16 (bit1), VSIA (bit5)
    expect_eq(dis.fil_a[17:16], 2'b01, "F16A only");
    expect_eq(dis.fil_b[17:16], 2'b00, "bank B 16/17 clear");
    expect_eq({dis.vsia, dis.vsib}, 2'b10, "VSIA only");
    wr(8'h02, 16'h0018);   // BDIS16, BDIS17
    expect_eq(dis.fil_b[17:16], 2'b11, "F16B F17B");
    expect_eq(dis.fil_a[17:16], 2'b00, "F16A cleared");

    // read-only registers ignore writes, unmapped addresses read 0
    for (int a = 0; a < 256; a++) model[a % 16] = '0;
    wr(8'h00, 16'hffff); rd_chk(8'h00, 16'h0001, "FVR read-only");
    wr(8'h0a, 16'hffff); rd_chk(8'h0a, 16'h0000, "SBSER read-only");
    wr(8'h0c, 16'hffff); rd_chk(8'h0c, 16'h0000, "PSE read-only");
    wr(8'h0d, 16'hffff); rd_chk(8'h0d, 16'h0000, "0x0d unmapped");
    wr(8'h81, 16'h5555); rd_chk(8'h81, 16'h0000, "0x81 unmapped");
    rd_chk(8'h01, 16'h1234, "RBT untouched by 0x81");
    rd_chk(8'h03, 16'ha55a, "CD1 untouched");

    // status fields, bit by bit
    for (int i = 0; i < 18; i++) begin
      done_a = 18'd1 << i; done_b = '0;
      rd_chk(8'h05, (i < 12) ? 16'(1 << i) : 16'h0, $sformatf("DONEA1 F%0dA", i));
      rd_chk(8'h06, (i >= 12) ? 16'(1 << (i - 12)) : 16'h0, $sformatf("DONEA2 F%0dA", i));
      done_b = 18'd1 << i; done_a = '0;
      rd_chk(8'h07, (i < 12) ? 16'(1 << i) : 16'h0, $sformatf("DONEB1 F%0dB", i));
      rd_chk(8'h08, (i >= 12) ? 16'(1 << (i - 12)) : 16'h0, $sformatf("DONEB2 F%0dB", i));
    end
    done_a = '1; done_b = '1;
    rd_chk(8'h05, 16'h0fff, "DONEA1 all");
    rd_chk(8'h06, 16'h003f, "DONEA2 all");
    rd_chk(8'h08, 16'h003f, "DONEB2 all");
    // DONE register: MCB=0 DMA=1 DMB=2 IC=3 WBC=4 TC=5 OUTA=6 OUTB=7 VSIA=8 VSIB=9
    for (int i = 0; i < 10; i++) begin
      done_other = 10'd1 << i;
      rd_chk(8'h09, 16'(1 << i), $sformatf("DONE bit %0d", i));
    end
    board_id = 16'hc0de; rd_chk(8'h0a, 16'hc0de, "SBSER");
    board_id = 16'h0311; rd_chk(8'h0a, 16'h0311, "SBSER 2");
    // PWS: CE=0, 5V=1, 3V3=2, 2V5=3, 1V5=4, 1V2B2=5, 1V2B1=6, 1V2B=7, 1V2A2=8, 1V2A1=9, 1V2A=10
    chip_ena = 1; pwr = '0; rd_chk(8'h0b, 16'h0001, "PWS CE");
    chip_ena = 0;
    pwr.v5 = 1;      rd_chk(8'h0b, 16'h0002, "PWS 5V");      pwr = '0;
    pwr.v3v3 = 1;    rd_chk(8'h0b, 16'h0004, "PWS 3V3");     pwr = '0;
    pwr.v2v5 = 1;    rd_chk(8'h0b, 16'h0008, "PWS 2V5");     pwr = '0;
    pwr.v1v5 = 1;    rd_chk(8'h0b, 16'h0010, "PWS 1V5");     pwr = '0;
    pwr.v1v2_b2 = 1; rd_chk(8'h0b, 16'h0020, "PWS 1V2B2");   pwr = '0;
    pwr.v1v2_b1 = 1; rd_chk(8'h0b, 16'h0040, "PWS 1V2B1");   pwr = '0;
    pwr.v1v2_b = 1;  rd_chk(8'h0b, 16'h0080, "PWS 1V2B");    pwr = '0;
    pwr.v1v2_a2 = 1; rd_chk(8'h0b, 16'h0100, "PWS 1V2A2");   pwr = '0;
    pwr.v1v2_a1 = 1; rd_chk(8'h0b, 16'h0200, "PWS 1V2A1");   pwr = '0;
    pwr.v1v2_a = 1;  rd_chk(8'h0b, 16'h0400, "PWS 1V2A");    pwr = '0;
    chip_ena = 1; pwr = '1; rd_chk(8'h0b, 16'h07ff, "PWS all");
    // PSE passes the latch bits through
    pse = 10'h3ff; rd_chk(8'h0c, 16'h03ff, "PSE all");
    pse = 10'h001; rd_chk(8'h0c, 16'h0001, "PSE E5");

    // random writes and reads against a model of the writable registers
    model[1] = 16'h1234; model[2] = 16'h0018; model[3] = 16'ha55a; model[4] = 16'h0ff0;
    for (int i = 0; i < 400; i++) begin
      logic [7:0] a;
      a = 8'($urandom_range(1, 4));
      if ($urandom_range(0, 1) != 0) begin
        v = 16'($urandom);
        wr(a, v);
        model[a] = (a == 8'h02) ? (v & 16'h007e) : v;
      end else begin
        rd_chk(a, model[a], $sformatf("random read @%0h", a));
      end
    end

    // reset clears the writable registers
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    for (int a = 1; a <= 4; a++) rd_chk(8'(a), 16'h0000, "cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
