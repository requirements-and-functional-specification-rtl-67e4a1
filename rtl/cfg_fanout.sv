// cfg_fanout: distributes the PCM card's configuration bus to every FPGA of
// the Station Board.
//
// The PCM card drives one 8-bit SelectMAP bus (CDATA, CCLK) and twelve
// active-low PROG_B lines. This block copies CDATA onto eleven byte buses
// (three per filter bank, one group of six chips each, plus CDATA_33,
// CDATA_33B, CDATA_WBC, CDATA_IC and CDATA_TC), copies CCLK onto one line per
// chip, and fans each PROG line out to its chip or chips:
//   PROG[1..8]  -> MCB, DMA, DMB, IC, WBC, TC, OUTA, OUTB
//   PROG[9]     -> VSIA and VSIB
//   PROG[10/11] -> the 18 filter FPGAs of bank A / bank B
// PROG[0] programs this FPGA itself and has nothing to drive here.
//
// Masking: a chip whose disable bit is set (CD1/CD2 for filters 0..15, the
// CC register for filters 16, 17 and the two VSI chips) sees its PROG_B held
// high, so it never gets the low pulse that starts a configuration; the rest
// of its group is still programmed. While chip_ena (CE, from the PCM card) is
// low no PROG pulse reaches any chip and the tristate data/clock outputs are
// released (cdata_oe low). The mapping and the masks are the specification's;
// holding a masked PROG_B high and using CE as output enable are this design's
// choices, as the specification only says what must be prevented.
//
// Purely combinational: the specification describes a buffer with at most
// 12 ns from pin to pin, so nothing here is registered.
module cfg_fanout
  import cfg_pkg::*;
(
  // from the PCM card
  input  logic [CDATA_W-1:0]                    cdata,
  input  logic                                  cclk,
  input  logic [N_PROG-1:0]                     nprog,     // PROG_B, active low
  input  logic                                  chip_ena,  // CE: programming allowed
  // per-chip disables from the register file
  input  prog_dis_t                             dis,
  // filter banks A and B, groups G1..G3 of six chips
  output logic [N_GROUPS-1:0][CDATA_W-1:0]      cdata_a,
  output logic [N_GROUPS-1:0][GROUP_SIZE-1:0]   cclk_a,
  output logic [N_GROUPS-1:0][GROUP_SIZE-1:0]   prog_a,    // PROG_B, active low
  output logic [N_GROUPS-1:0][CDATA_W-1:0]      cdata_b,
  output logic [N_GROUPS-1:0][GROUP_SIZE-1:0]   cclk_b,
  output logic [N_GROUPS-1:0][GROUP_SIZE-1:0]   prog_b,
  // the other ten FPGAs: MCB, DMA, DMB, IC, WBC, TC, OUTA, OUTB, VSIA, VSIB
  output logic [CDATA_W-1:0]                    cdata_33,
  output logic [CDATA_W-1:0]                    cdata_33b,
  output logic [CDATA_W-1:0]                    cdata_wbc,
  output logic [CDATA_W-1:0]                    cdata_ic,
  output logic [CDATA_W-1:0]                    cdata_tc,
  output logic [N_OTHER-1:0]                    cclk_other,
  output logic [N_OTHER-1:0]                    prog_other,
  output logic                                  cdata_oe
);
  // PROG level for one chip: follows its PCM line unless blocked.
  function automatic logic gate(input logic nprog_line, input logic blocked);
    return nprog_line | blocked;
  endfunction

  logic blk_all;
  assign blk_all  = ~chip_ena;
  assign cdata_oe = chip_ena;

  always_comb begin
    for (int g = 0; g < N_GROUPS; g++) begin
      cdata_a[g] = cdata;
      cdata_b[g] = cdata;
      cclk_a[g]  = {GROUP_SIZE{cclk}};
      cclk_b[g]  = {GROUP_SIZE{cclk}};
      for (int c = 0; c < GROUP_SIZE; c++) begin
        prog_a[g][c] = gate(nprog[PD_FILA], blk_all | dis.fil_a[g*GROUP_SIZE + c]);
        prog_b[g][c] = gate(nprog[PD_FILB], blk_all | dis.fil_b[g*GROUP_SIZE + c]);
      end
    end
    cdata_33   = cdata;
    cdata_33b  = cdata;
    cdata_wbc  = cdata;
    cdata_ic   = cdata;
    cdata_tc   = cdata;
    cclk_other = {N_OTHER{cclk}};

    prog_other[O_MCB]  = gate(nprog[PD_MCB],  blk_all);
    prog_other[O_DMA]  = gate(nprog[PD_DMA],  blk_all);
    prog_other[O_DMB]  = gate(nprog[PD_DMB],  blk_all);
    prog_other[O_IC]   = gate(nprog[PD_IC],   blk_all);
    prog_other[O_WBC]  = gate(nprog[PD_WBC],  blk_all);
    prog_other[O_TC]   = gate(nprog[PD_TC],   blk_all);
    prog_other[O_OUTA] = gate(nprog[PD_OUTA], blk_all);
    prog_other[O_OUTB] = gate(nprog[PD_OUTB], blk_all);
    prog_other[O_VSIA] = gate(nprog[PD_VSI],  blk_all | dis.vsia);
    prog_other[O_VSIB] = gate(nprog[PD_VSI],  blk_all | dis.vsib);
  end

  // A masked chip must never see PROG_B low.
  always_comb begin
    for (int i = 0; i < N_GROUPS * GROUP_SIZE; i++) begin
      if (dis.fil_a[i]) assert (prog_a[i / GROUP_SIZE][i % GROUP_SIZE]);
      if (dis.fil_b[i]) assert (prog_b[i / GROUP_SIZE][i % GROUP_SIZE]);
    end
  end
endmodule
