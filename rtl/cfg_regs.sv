// cfg_regs: the register file the MCB FPGA reads and writes.
//
// Thirteen 16-bit registers at MCB addresses 0x00..0x0c:
//   0x00 FVR    R   version [7:4], revision [3:0] (parameters)
//   0x01 RBT    R/W read-back test, holds the last value written
//   0x02 CC     R/W bits 6:1: disables of F16A, F17A, F16B, F17B, VSIA, VSIB
//   0x03 CD1    R/W disables of filters F0A..F15A
//   0x04 CD2    R/W disables of filters F0B..F15B
//   0x05 DONEA1 R   DONE of F0A..F11A      0x06 DONEA2 R DONE of F12A..F17A
//   0x07 DONEB1 R   DONE of F0B..F11B      0x08 DONEB2 R DONE of F12B..F17B
//   0x09 DONE   R   DONE of MCB, DMA, DMB, IC, WBC, TC, OUTA, OUTB, VSIA, VSIB
//   0x0a SBSER  R   board serial number straps
//   0x0b PWS    R   bit 0 CE, bits 10:1 power-good of the ten supplies
//   0x0c PSE    R   sticky power errors, cleared by reading (pwr_err_latch)
// Unused bits, unimplemented addresses and writes to read-only registers
// read as 0 / are ignored. The map, fields and reset values are the
// specification's.
//
// Bus: the specification names the MCB pins (MCB_CLK, MCB_CS, MCB_RW,
// MCB_ADDR[7:0], MCB_DATA[15:0]) but not their timing, so this design uses a
// single-cycle synchronous bus: with cs high, rw low writes wdata on the rising
// MCB_CLK edge; with cs high and rw high the addressed register is driven on
// rdata combinationally (rdata_oe high, to turn the bidirectional pins) and
// the MCB samples it on the edge that ends the cycle. pse_rd is high during a
// read of PSE so the error latch clears on that same edge. Status inputs must
// already be synchronised to clk. Reset (active high, asynchronous) clears the
// writable registers.
module cfg_regs
  import cfg_pkg::*;
#(
  parameter logic [3:0] VERSION  = 4'd0,
  parameter logic [3:0] REVISION = 4'd1
) (
  input  logic                  clk,
  input  logic                  rst,
  // MCB bus
  input  logic                  cs,
  input  logic                  rw,       // 1 = read, 0 = write
  input  logic [MCB_ADDR_W-1:0] addr,
  input  logic [MCB_DATA_W-1:0] wdata,
  output logic [MCB_DATA_W-1:0] rdata,
  output logic                  rdata_oe,
  // status, synchronised to clk
  input  logic [N_FILT-1:0]     done_a,
  input  logic [N_FILT-1:0]     done_b,
  input  logic [N_OTHER-1:0]    done_other,
  input  logic [MCB_DATA_W-1:0] board_id,
  input  logic                  chip_ena,
  input  pwr_stat_t             pwr,
  input  logic [N_PWR-1:0]      pse,
  output logic                  pse_rd,
  // decoded programming disables
  output prog_dis_t             dis
);
  logic [MCB_DATA_W-1:0] rbt_q, cc_q, cd1_q, cd2_q;
  logic                  wr_en, rd_en;

  assign wr_en = cs & ~rw;
  assign rd_en = cs & rw;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      rbt_q <= '0;
      cc_q  <= '0;
      cd1_q <= '0;
      cd2_q <= '0;
    end else if (wr_en) begin
      unique case (addr)
        A_RBT:   rbt_q <= wdata;
        A_CC:    cc_q  <= wdata & CC_MASK;
        A_CD1:   cd1_q <= wdata;
        A_CD2:   cd2_q <= wdata;
        default: ;
      endcase
    end
  end

  always_comb begin
    rdata = '0;
    unique case (addr)
      A_FVR:    rdata = {8'h00, VERSION, REVISION};
      A_RBT:    rdata = rbt_q;
      A_CC:     rdata = cc_q;
      A_CD1:    rdata = cd1_q;
      A_CD2:    rdata = cd2_q;
      A_DONEA1: rdata[11:0] = done_a[11:0];
      A_DONEA2: rdata[5:0]  = done_a[N_FILT-1:12];
      A_DONEB1: rdata[11:0] = done_b[11:0];
      A_DONEB2: rdata[5:0]  = done_b[N_FILT-1:12];
      A_DONE:   rdata[N_OTHER-1:0] = done_other;
      A_SBSER:  rdata = board_id;
      A_PWS:    rdata[N_PWR:0] = {pwr, chip_ena};
      A_PSE:    rdata[N_PWR-1:0] = pse;
      default:  ;
    endcase
  end

  assign rdata_oe = rd_en;
  assign pse_rd   = rd_en && (addr == A_PSE);

  assign dis.fil_a = {cc_q[CC_ADIS17], cc_q[CC_ADIS16], cd1_q};
  assign dis.fil_b = {cc_q[CC_BDIS17], cc_q[CC_BDIS16], cd2_q};
  assign dis.vsia  = cc_q[CC_VSIA];
  assign dis.vsib  = cc_q[CC_VSIB];
endmodule
