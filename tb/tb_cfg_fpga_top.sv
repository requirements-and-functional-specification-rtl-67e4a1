// tb_cfg_fpga_top: end-to-end test of the configuration fan-out FPGA at its
// default parameters, with all 46 target FPGAs modelled (target_cfg_model).
//
// The testbench plays both the PCM card (PROG_B pulses, a wait standing for
// T_WAIT, then a byte stream on CDATA clocked by CCLK) and the MCB FPGA
// (single-cycle register accesses). Sequence:
//   1. power-up: only DONE[0] high, FVR and RBT read back;
//   2. full board configuration, PROG[1]..PROG[11] one after another, each
//      checked on DONE[11:0] and in the DONE status registers;
//   3. masked reprogramming of one filter chip per bank (CD1/CD2/CC), with
//      every other chip of the bank left configured;
//   4. VSI masking through CC: PROG[9] reprograms VSIA only;
//   5. CE low: a PROG pulse reaches no chip and the data pins are released;
//   6. a dip on a power-good line: PWS follows it, PSE latches it and is
//      cleared by reading;
//   7. SBSER returns the board ID straps.
// Each mechanism is counted and a failure is added for one that never ran.
// PROG and DONE are also checked to cross the FPGA within 12 ns.
module tb_cfg_fpga_top;
  import cfg_pkg::*;
  localparam int NBYTES = 24;

  logic reset_p = 1, mcb_clk_p = 0, mcb_cs_p = 0, mcb_rw_p = 1;
  logic [7:0]  mcb_addr_p = '0;
  logic [15:0] mcb_data_i = '0, mcb_data_o;
  logic        mcb_data_oe;
  logic [7:0]  cdata_p = '0;
  logic        cclk_p = 0;
  logic [11:0] nprog_p = '1, done_p;
  logic        chip_ena_p = 1;
  logic [2:0][7:0] cdata_ag, cdata_bg;
  logic [2:0][5:0] cclk_ag, prog_ag, done_ag, cclk_bg, prog_bg, done_bg;
  logic [7:0] cdata_33_p, cdata_33b_p, cdata_wbc_p, cdata_ic_p, cdata_tc_p;
  logic [9:0] other_cclk, other_prog, other_done;
  logic       cdata_oe;
  logic stat_5v = 1, stat_3v3 = 1, stat_2v5 = 1, stat_1v5 = 1, stat_1v2_b2 = 1,
        stat_1v2_b1 = 1, stat_1v2_b = 1, stat_1v2_a2 = 1, stat_1v2_a1 = 1, stat_1v2_a = 1;
  logic [15:0] board_id = 16'h0a17;

  cfg_fpga_top dut (.*);

  always #5 mcb_clk_p = ~mcb_clk_p;

  // ---- the 46 target FPGAs --------------------------------------------
  int ncfg_a [18], nbad_a [18], ncfg_b [18], nbad_b [18], ncfg_o [10], nbad_o [10];
  logic [7:0] other_cdata [10];

  for (genvar f = 0; f < 18; f++) begin : g_fil
    target_cfg_model #(.NBYTES(NBYTES)) u_a (
      .prog_b (prog_ag[f / 6][f % 6]), .cclk (cclk_ag[f / 6][f % 6]),
      .cdata (cdata_ag[f / 6]), .cdata_oe (cdata_oe),
      .done (done_ag[f / 6][f % 6]), .n_configs (ncfg_a[f]), .n_bad (nbad_a[f]));
    target_cfg_model #(.NBYTES(NBYTES)) u_b (
      .prog_b (prog_bg[f / 6][f % 6]), .cclk (cclk_bg[f / 6][f % 6]),
      .cdata (cdata_bg[f / 6]), .cdata_oe (cdata_oe),
      .done (done_bg[f / 6][f % 6]), .n_configs (ncfg_b[f]), .n_bad (nbad_b[f]));
  end

  // data bus of each single chip: MCB+DMA on CDATA_33, DMB on CDATA_33B,
  // TC+OUTA+OUTB on CDATA_TC, WBC+VSIA on CDATA_WBC, IC+VSIB on CDATA_IC
  assign other_cdata[0] = cdata_33_p;  assign other_cdata[1] = cdata_33_p;
  assign other_cdata[2] = cdata_33b_p; assign other_cdata[3] = cdata_ic_p;
  assign other_cdata[4] = cdata_wbc_p; assign other_cdata[5] = cdata_tc_p;
  assign other_cdata[6] = cdata_tc_p;  assign other_cdata[7] = cdata_tc_p;
  assign other_cdata[8] = cdata_wbc_p; assign other_cdata[9] = cdata_ic_p;

  for (genvar o = 0; o < 10; o++) begin : g_oth
    target_cfg_model #(.NBYTES(NBYTES)) u_o (
      .prog_b (other_prog[o]), .cclk (other_cclk[o]), .cdata (other_cdata[o]),
      .cdata_oe (cdata_oe), .done (other_done[o]),
      .n_configs (ncfg_o[o]), .n_bad (nbad_o[o]));
  end

  // ---- checking -----------------------------------------------------------
  int checks = 0, failures = 0;
  int n_full_cfg = 0, n_masked_fil = 0, n_masked_vsi = 0, n_ce_block = 0,
      n_pse_set = 0, n_pse_clr = 0, n_readback = 0, n_status_reads = 0;

  task automatic expect_eq(input logic [63:0] got, input logic [63:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, want);
    end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- MCB bus master ---------------------------------------------------------
  task automatic mcb_wr(input logic [7:0] a, input logic [15:0] d);
    @(negedge mcb_clk_p);
    mcb_cs_p = 1; mcb_rw_p = 0; mcb_addr_p = a; mcb_data_i = d;
    @(negedge mcb_clk_p);
    mcb_cs_p = 0; mcb_rw_p = 1;
  endtask

  task automatic mcb_rd(input logic [7:0] a, output logic [15:0] d);
    @(negedge mcb_clk_p);
    mcb_cs_p = 1; mcb_rw_p = 1; mcb_addr_p = a;
    @(posedge mcb_clk_p);
    d = mcb_data_o;
    expect_eq(mcb_data_oe, 1, "MCB_DATA driven during read");
    @(negedge mcb_clk_p);
    mcb_cs_p = 0;
  endtask

  task automatic mcb_chk(input logic [7:0] a, input logic [15:0] want, input string what);
    logic [15:0] d;
    mcb_rd(a, d);
    expect_eq(d, want, what);
  endtask

  task automatic settle();  // let the status synchronisers catch up
    repeat (4) @(posedge mcb_clk_p);
  endtask

  // ---- PCM card ---------------------------------------------------------------
  function automatic logic [7:0] byte_of(input int n);
    return 8'((n * 37 + 11) ^ (n >> 3));
  endfunction

  // expected PROG_B of every chip while PROG[k] is low (chip enabled, not masked)
  logic [11:0] done_12ns;
  logic [17:0] mask_a = '0, mask_b = '0;  // filters the MCB has disabled

  task automatic pcm_prog(input int k);
    nprog_p[k] = 0;
    #12ns;  // PROG must cross the FPGA within 12 ns
    if (chip_ena_p) begin
      if (k == 10) expect_eq(prog_ag, mask_a, "PROG[10] reaches bank A within 12 ns");
      if (k == 11) expect_eq(prog_bg, mask_b, "PROG[11] reaches bank B within 12 ns");
      if (k >= 1 && k <= 8) expect_eq(other_prog, 10'(~(10'd1 << (k - 1))), $sformatf("PROG[%0d] within 12 ns", k));
    end
    #288ns;
    nprog_p[k] = 1;
    #2us;  // T_WAIT: the targets get ready for the bitstream
  endtask

  task automatic pcm_stream();
    for (int n = 0; n < NBYTES; n++) begin
      cclk_p = 0; cdata_p = byte_of(n);
      #25ns;
      cclk_p = 1;
      if (n == NBYTES - 1) begin
        #12ns done_12ns = done_p;  // DONE must cross back within 12 ns
        #13ns;
      end else begin
        #25ns;
      end
    end
    cclk_p = 0;
    #100ns;
  endtask

  function automatic int total_configs();
    int s = 0;
    for (int i = 0; i < 18; i++) s += ncfg_a[i] + ncfg_b[i];
    for (int i = 0; i < 10; i++) s += ncfg_o[i];
    return s;
  endfunction

  // ---- sequence -------------------------------------------------------------
  logic [15:0] d;
  int cfg_count0;

  initial begin
    #1;
    repeat (3) @(posedge mcb_clk_p);
    reset_p = 0;
    settle();

    // 1. power-up
    expect_eq(done_p, 12'h001, "only this FPGA is done at power-up");
    mcb_chk(8'h00, 16'h0001, "FVR");
    mcb_wr(8'h01, 16'h5ac3);
    mcb_chk(8'h01, 16'h5ac3, "RBT read back");
    mcb_wr(8'h01, 16'ha53c);
    mcb_chk(8'h01, 16'ha53c, "RBT read back 2");
    n_readback++;
    mcb_chk(8'h0b, 16'h07ff, "PWS: CE and all supplies good");
    mcb_chk(8'h0c, 16'h0000, "no power error after power-up");

    // 2. full board configuration
    for (int k = 1; k < 12; k++) begin
      pcm_prog(k);
      pcm_stream();
      expect_eq(done_12ns[k], 1, $sformatf("DONE[%0d] within 12 ns of the last byte", k));
    end
    expect_eq(done_p, 12'hfff, "whole board configured");
    for (int i = 0; i < 18; i++) begin
      expect_eq(ncfg_a[i], 1, $sformatf("F%0dA configured once", i));
      expect_eq(ncfg_b[i], 1, $sformatf("F%0dB configured once", i));
    end
    for (int i = 0; i < 10; i++) expect_eq(ncfg_o[i], 1, $sformatf("chip %0d configured once", i));
    if (done_p == 12'hfff) n_full_cfg++;
    settle();
    mcb_chk(8'h05, 16'h0fff, "DONEA1");
    mcb_chk(8'h06, 16'h003f, "DONEA2");
    mcb_chk(8'h07, 16'h0fff, "DONEB1");
    mcb_chk(8'h08, 16'h003f, "DONEB2");
    mcb_chk(8'h09, 16'h03ff, "DONE");
    n_status_reads++;

    // 3. reprogram F5A and F16B only
    mcb_wr(8'h03, 16'hffdf);                 // CD1: all but F5A
    mcb_wr(8'h04, 16'hffff);                 // CD2: F0B..F15B
    mcb_wr(8'h02, 16'h0010 | 16'h0006);      // CC: ADIS16, ADIS17, BDIS17
    mcb_chk(8'h02, 16'h0016, "CC");
    mask_a = {2'b11, 16'hffdf};
    mask_b = {2'b10, 16'hffff};
    pcm_prog(10);
    expect_eq(done_p[10], 0, "bank A DONE low while F5A reloads");
    settle();
    mcb_chk(8'h05, 16'h0fdf, "DONEA1 shows F5A unconfigured");
    pcm_prog(11);
    expect_eq(done_p[11], 0, "bank B DONE low while F16B reloads");
    settle();
    mcb_chk(8'h08, 16'h002f, "DONEB2 shows F16B unconfigured");
    pcm_stream();
    expect_eq(done_p[11:10], 2'b11, "both banks done again");
    begin
      int ok = 1;
      for (int i = 0; i < 18; i++) begin
        if (ncfg_a[i] != ((i == 5) ? 2 : 1)) ok = 0;
        if (ncfg_b[i] != ((i == 16) ? 2 : 1)) ok = 0;
      end
      expect_eq(ok, 1, "only F5A and F16B were reprogrammed");
      if (ok) n_masked_fil++;
    end

    // 4. VSIB masked: PROG[9] reprograms VSIA only
    mcb_wr(8'h02, 16'h0040);
    pcm_prog(9);
    expect_eq(done_p[9], 0, "VSI DONE low while VSIA reloads");
    settle();
    mcb_chk(8'h09, 16'h02ff, "DONE register: VSIA low, VSIB high");
    pcm_stream();
    expect_eq(done_p[9], 1, "VSI pair done");
    expect_eq({ncfg_o[8], ncfg_o[9]}, {32'd2, 32'd1}, "VSIA reprogrammed, VSIB not");
    if (ncfg_o[8] == 2 && ncfg_o[9] == 1) n_masked_vsi++;

    // 5. CE low blocks programming
    chip_ena_p = 0;
    settle();
    mcb_chk(8'h0b, 16'h07fe, "PWS shows CE low");
    expect_eq(cdata_oe, 0, "configuration pins released with CE low");
    cfg_count0 = total_configs();
    nprog_p = '0;
    #12ns;
    expect_eq(other_prog, 10'h3ff, "no PROG pulse with CE low");
    nprog_p = '1;
    #2us;
    pcm_stream();
    expect_eq(done_p, 12'hfff, "nothing lost its configuration");
    expect_eq(total_configs(), cfg_count0, "no chip reconfigured with CE low");
    if (done_p == 12'hfff && total_configs() == cfg_count0) n_ce_block++;
    chip_ena_p = 1;
    settle();

    // 6. a dip on the 2.5 V supply
    @(negedge mcb_clk_p) stat_2v5 = 0;
    settle();
    mcb_chk(8'h0b, 16'h07f7, "PWS shows 2V5 out of range");
    stat_2v5 = 1;
    settle();
    mcb_chk(8'h0b, 16'h07ff, "PWS shows 2V5 back");
    mcb_rd(8'h0c, d);
    expect_eq(d, 16'h0004, "PSE E2V5 stays set");
    if (d == 16'h0004) n_pse_set++;
    mcb_rd(8'h0c, d);
    expect_eq(d, 16'h0000, "PSE cleared by the read");
    if (d == 16'h0000) n_pse_clr++;
    // two supplies: 1V2A and 5V
    @(negedge mcb_clk_p) begin stat_1v2_a = 0; stat_5v = 0; end
    @(negedge mcb_clk_p) begin stat_1v2_a = 1; stat_5v = 1; end
    settle();
    mcb_chk(8'h0c, 16'h0201, "PSE E1V2A and E5");
    mcb_chk(8'h0c, 16'h0000, "PSE cleared again");

    // 7. serial number straps
    mcb_chk(8'h0a, 16'h0a17, "SBSER");

    // no target ever saw a wrong byte
    begin
      int bad = 0;
      for (int i = 0; i < 18; i++) bad += nbad_a[i] + nbad_b[i];
      for (int i = 0; i < 10; i++) bad += nbad_o[i];
      expect_eq(bad, 0, "bitstream bytes arrived intact");
    end

    $display("mechanisms: full_config=%0d masked_filter=%0d masked_vsi=%0d ce_block=%0d pse_set=%0d pse_clear=%0d readback=%0d status_reads=%0d",
             n_full_cfg, n_masked_fil, n_masked_vsi, n_ce_block, n_pse_set, n_pse_clr, n_readback, n_status_reads);
    if (n_full_cfg == 0)     begin failures++; $display("FAIL full configuration never happened"); end
    if (n_masked_fil == 0)   begin failures++; $display("FAIL masked filter reprogramming never happened"); end
    if (n_masked_vsi == 0)   begin failures++; $display("FAIL VSI masking never happened"); end
    if (n_ce_block == 0)     begin failures++; $display("FAIL CE blocking never happened"); end
    if (n_pse_set == 0)      begin failures++; $display("FAIL power error never latched"); end
    if (n_pse_clr == 0)      begin failures++; $display("FAIL power error never cleared"); end
    if (n_readback == 0)     begin failures++; $display("FAIL read-back never happened"); end
    if (n_status_reads == 0) begin failures++; $display("FAIL DONE status never read"); end
    checks += 8;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
