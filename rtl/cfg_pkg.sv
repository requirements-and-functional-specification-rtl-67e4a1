// cfg_pkg: constants shared by the configuration fan-out FPGA.
//
// Holds the MCB register map (addresses 0x00..0x0c), the sizes of the
// configuration groups and the index of every chip in the 12-bit PROG/DONE
// pair that the PCM card drives and reads. Register addresses, field
// positions and the PROG/DONE mapping follow the register tables of the
// specification; the enum encoding of the address and the widths of the MCB
// bus (8-bit address, 16-bit data, taken from the board pinout) are carried
// here so every module uses the same numbers.
package cfg_pkg;

  localparam int unsigned MCB_ADDR_W = 8;   // MCB_ADDR[7:0]
  localparam int unsigned MCB_DATA_W = 16;  // MCB_DATA[15:0]
  localparam int unsigned CDATA_W    = 8;   // 8-bit SelectMAP configuration port
  localparam int unsigned N_PROG     = 12;  // PROG[11:0] and DONE[11:0] from/to the PCM card
  localparam int unsigned N_GROUPS   = 3;   // groups per filter bank (G1..G3)
  localparam int unsigned GROUP_SIZE = 6;   // filter FPGAs per group
  localparam int unsigned N_FILT     = N_GROUPS * GROUP_SIZE;  // 18 filter FPGAs per bank
  localparam int unsigned N_OTHER    = 10;  // OTHER_CCLK/PROG/DONE[9:0]
  localparam int unsigned N_PWR      = 10;  // monitored power sources

  // Register addresses (Table "CFG FPGA memory map").
  typedef enum logic [MCB_ADDR_W-1:0] {
    A_FVR    = 8'h00,
    A_RBT    = 8'h01,
    A_CC     = 8'h02,
    A_CD1    = 8'h03,
    A_CD2    = 8'h04,
    A_DONEA1 = 8'h05,
    A_DONEA2 = 8'h06,
    A_DONEB1 = 8'h07,
    A_DONEB2 = 8'h08,
    A_DONE   = 8'h09,
    A_SBSER  = 8'h0a,
    A_PWS    = 8'h0b,
    A_PSE    = 8'h0c
  } reg_addr_e;

  // PROG/DONE pair index of each chip or chip group.
  localparam int unsigned PD_CFG  = 0;
  localparam int unsigned PD_MCB  = 1;
  localparam int unsigned PD_DMA  = 2;
  localparam int unsigned PD_DMB  = 3;
  localparam int unsigned PD_IC   = 4;
  localparam int unsigned PD_WBC  = 5;
  localparam int unsigned PD_TC   = 6;
  localparam int unsigned PD_OUTA = 7;
  localparam int unsigned PD_OUTB = 8;
  localparam int unsigned PD_VSI  = 9;
  localparam int unsigned PD_FILA = 10;
  localparam int unsigned PD_FILB = 11;

  // Index of each single chip in the OTHER_* buses and in the DONE (0x09)
  // register: MCB, DMA, DMB, IC, WBC, TC, OUTA, OUTB, VSIA, VSIB.
  localparam int unsigned O_MCB  = 0;
  localparam int unsigned O_DMA  = 1;
  localparam int unsigned O_DMB  = 2;
  localparam int unsigned O_IC   = 3;
  localparam int unsigned O_WBC  = 4;
  localparam int unsigned O_TC   = 5;
  localparam int unsigned O_OUTA = 6;
  localparam int unsigned O_OUTB = 7;
  localparam int unsigned O_VSIA = 8;
  localparam int unsigned O_VSIB = 9;

  // CC register fields (address 0x02): bit 0 unused.
  localparam int unsigned CC_ADIS16 = 1;
  localparam int unsigned CC_ADIS17 = 2;
  localparam int unsigned CC_BDIS16 = 3;
  localparam int unsigned CC_BDIS17 = 4;
  localparam int unsigned CC_VSIA   = 5;
  localparam int unsigned CC_VSIB   = 6;
  localparam logic [MCB_DATA_W-1:0] CC_MASK = 16'h007e;

  // Power sources in PWS bit order 1..10 (bit 0 of PWS is CE); PSE bit i
  // belongs to PWS bit i+1.
  typedef struct packed {
    logic v1v2_a;   // PWS[10] / PSE[9]
    logic v1v2_a1;  // PWS[9]  / PSE[8]
    logic v1v2_a2;  // PWS[8]  / PSE[7]
    logic v1v2_b;   // PWS[7]  / PSE[6]
    logic v1v2_b1;  // PWS[6]  / PSE[5]
    logic v1v2_b2;  // PWS[5]  / PSE[4]
    logic v1v5;     // PWS[4]  / PSE[3]
    logic v2v5;     // PWS[3]  / PSE[2]
    logic v3v3;     // PWS[2]  / PSE[1]
    logic v5;       // PWS[1]  / PSE[0]
  } pwr_stat_t;

  // Per-chip disable masks decoded from CC, CD1 and CD2.
  typedef struct packed {
    logic [N_FILT-1:0] fil_a;  // F0A..F17A
    logic [N_FILT-1:0] fil_b;  // F0B..F17B
    logic              vsia;
    logic              vsib;
  } prog_dis_t;

endpackage
