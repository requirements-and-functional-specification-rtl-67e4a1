// cfg_fpga_top: Station Board configuration fan-out FPGA.
//
// Sits between the PCM card, which holds the configuration bitstreams, and
// the 46 other FPGAs of the Station Board. Two independent paths:
//
//  * Configuration path (combinational, no clock): CDATA[7:0] and CCLK from
//    the PCM card are copied to every chip, the twelve PROG_B lines are fanned
//    out to their chips with per-chip masking (cfg_fanout), and the chips'
//    DONE lines are combined back into twelve (done_combiner).
//  * Control path (MCB_CLK domain): the MCB FPGA reads and writes thirteen
//    16-bit registers (cfg_regs). The per-chip DONE lines, power-good lines,
//    CHIP_ENA and board ID straps pass through a synchroniser (sync_bits,
//    SYNC_STAGES flops, a choice of this design) before the register file and
//    the power-error latch (pwr_err_latch) see them.
//
// Filter bank ports are [group][chip] arrays: group 0..2 is G1..G3 and chip
// 0..5 within the group; filter Fn of a bank is group n/6, chip n%6. The ten
// single chips share OTHER_* buses in the order MCB, DMA, DMB, IC, WBC, TC,
// OUTA, OUTB, VSIA, VSIB. The bidirectional MCB_DATA pins are split into
// mcb_data_i, mcb_data_o and mcb_data_oe; the tristate CDATA/CCLK pins share
// one enable, cdata_oe. The grouping, register map and PROG/DONE mapping are
// the specification's; bus timing, synchronisation and pin splitting are this
// design's. The test_port[3:0] pins of the board have no described function
// and are not brought out.
module cfg_fpga_top
  import cfg_pkg::*;
#(
  parameter logic [3:0]  VERSION     = 4'd0,
  parameter logic [3:0]  REVISION    = 4'd1,
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic                                reset_p,
  // MCB FPGA bus
  input  logic                                mcb_clk_p,
  input  logic                                mcb_cs_p,
  input  logic                                mcb_rw_p,
  input  logic [MCB_ADDR_W-1:0]               mcb_addr_p,
  input  logic [MCB_DATA_W-1:0]               mcb_data_i,
  output logic [MCB_DATA_W-1:0]               mcb_data_o,
  output logic                                mcb_data_oe,
  // PCM card
  input  logic [CDATA_W-1:0]                  cdata_p,
  input  logic                                cclk_p,
  input  logic [N_PROG-1:0]                   nprog_p,
  output logic [N_PROG-1:0]                   done_p,
  input  logic                                chip_ena_p,
  // filter banks A and B
  output logic [N_GROUPS-1:0][CDATA_W-1:0]    cdata_ag,
  output logic [N_GROUPS-1:0][GROUP_SIZE-1:0] cclk_ag,
  output logic [N_GROUPS-1:0][GROUP_SIZE-1:0] prog_ag,
  input  logic [N_GROUPS-1:0][GROUP_SIZE-1:0] done_ag,
  output logic [N_GROUPS-1:0][CDATA_W-1:0]    cdata_bg,
  output logic [N_GROUPS-1:0][GROUP_SIZE-1:0] cclk_bg,
  output logic [N_GROUPS-1:0][GROUP_SIZE-1:0] prog_bg,
  input  logic [N_GROUPS-1:0][GROUP_SIZE-1:0] done_bg,
  // the other ten FPGAs
  output logic [CDATA_W-1:0]                  cdata_33_p,
  output logic [CDATA_W-1:0]                  cdata_33b_p,
  output logic [CDATA_W-1:0]                  cdata_wbc_p,
  output logic [CDATA_W-1:0]                  cdata_ic_p,
  output logic [CDATA_W-1:0]                  cdata_tc_p,
  output logic [N_OTHER-1:0]                  other_cclk,
  output logic [N_OTHER-1:0]                  other_prog,
  input  logic [N_OTHER-1:0]                  other_done,
  output logic                                cdata_oe,
  // board status
  input  logic                                stat_5v,
  input  logic                                stat_3v3,
  input  logic                                stat_2v5,
  input  logic                                stat_1v5,
  input  logic                                stat_1v2_b2,
  input  logic                                stat_1v2_b1,
  input  logic                                stat_1v2_b,
  input  logic                                stat_1v2_a2,
  input  logic                                stat_1v2_a1,
  input  logic                                stat_1v2_a,
  input  logic [MCB_DATA_W-1:0]               board_id
);
  // ---- configuration path -------------------------------------------------
  prog_dis_t dis;

  cfg_fanout u_fanout (
    .cdata      (cdata_p),
    .cclk       (cclk_p),
    .nprog      (nprog_p),
    .chip_ena   (chip_ena_p),
    .dis        (dis),
    .cdata_a    (cdata_ag),
    .cclk_a     (cclk_ag),
    .prog_a     (prog_ag),
    .cdata_b    (cdata_bg),
    .cclk_b     (cclk_bg),
    .prog_b     (prog_bg),
    .cdata_33   (cdata_33_p),
    .cdata_33b  (cdata_33b_p),
    .cdata_wbc  (cdata_wbc_p),
    .cdata_ic   (cdata_ic_p),
    .cdata_tc   (cdata_tc_p),
    .cclk_other (other_cclk),
    .prog_other (other_prog),
    .cdata_oe   (cdata_oe)
  );

  done_combiner u_done (
    .done_a     (done_ag),
    .done_b     (done_bg),
    .done_other (other_done),
    .done_pcmc  (done_p)
  );

  // ---- control path -------------------------------------------------------
  typedef struct packed {
    logic [N_FILT-1:0]     done_a;
    logic [N_FILT-1:0]     done_b;
    logic [N_OTHER-1:0]    done_other;
    logic [MCB_DATA_W-1:0] board_id;
    logic                  chip_ena;
    pwr_stat_t             pwr;
  } status_t;

  status_t st_async, st_sync;
  logic [N_PWR-1:0] pse;
  logic             pse_rd;

  always_comb begin
    st_async.done_a      = done_ag;
    st_async.done_b      = done_bg;
    st_async.done_other  = other_done;
    st_async.board_id    = board_id;
    st_async.chip_ena    = chip_ena_p;
    st_async.pwr.v5      = stat_5v;
    st_async.pwr.v3v3    = stat_3v3;
    st_async.pwr.v2v5    = stat_2v5;
    st_async.pwr.v1v5    = stat_1v5;
    st_async.pwr.v1v2_b2 = stat_1v2_b2;
    st_async.pwr.v1v2_b1 = stat_1v2_b1;
    st_async.pwr.v1v2_b  = stat_1v2_b;
    st_async.pwr.v1v2_a2 = stat_1v2_a2;
    st_async.pwr.v1v2_a1 = stat_1v2_a1;
    st_async.pwr.v1v2_a  = stat_1v2_a;
  end

  sync_bits #(.WIDTH($bits(status_t)), .STAGES(SYNC_STAGES)) u_sync (
    .clk (mcb_clk_p),
    .rst (reset_p),
    .d   (st_async),
    .q   (st_sync)
  );

  cfg_regs #(.VERSION(VERSION), .REVISION(REVISION)) u_regs (
    .clk        (mcb_clk_p),
    .rst        (reset_p),
    .cs         (mcb_cs_p),
    .rw         (mcb_rw_p),
    .addr       (mcb_addr_p),
    .wdata      (mcb_data_i),
    .rdata      (mcb_data_o),
    .rdata_oe   (mcb_data_oe),
    .done_a     (st_sync.done_a),
    .done_b     (st_sync.done_b),
    .done_other (st_sync.done_other),
    .board_id   (st_sync.board_id),
    .chip_ena   (st_sync.chip_ena),
    .pwr        (st_sync.pwr),
    .pse        (pse),
    .pse_rd     (pse_rd),
    .dis        (dis)
  );

  pwr_err_latch #(.N(N_PWR)) u_pse (
    .clk    (mcb_clk_p),
    .rst    (reset_p),
    .stat   (st_sync.pwr),
    .rd_clr (pse_rd),
    .err    (pse)
  );
endmodule
