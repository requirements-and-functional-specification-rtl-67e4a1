// done_combiner: builds the 12 DONE lines returned to the PCM card.
//
// DONE[k] reports the chip or chip group programmed by PROG[k]. Single chips
// are passed straight through; the VSI pair and each 18-chip filter bank are
// combined with an AND, so the line reads 1 only when every chip of the group
// is configured (the open-drain DONE pins of a group, pulled up, behave the
// same way). DONE[0] belongs to this FPGA itself: it is driven 1 because this
// logic only runs once the FPGA is configured. The group mapping is the
// specification's; the AND is this design's reading of "summed together".
//
// Purely combinational: a buffer path with no clock.
module done_combiner
  import cfg_pkg::*;
(
  input  logic [N_FILT-1:0]  done_a,      // F0A..F17A
  input  logic [N_FILT-1:0]  done_b,      // F0B..F17B
  input  logic [N_OTHER-1:0] done_other,  // MCB,DMA,DMB,IC,WBC,TC,OUTA,OUTB,VSIA,VSIB
  output logic [N_PROG-1:0]  done_pcmc
);
  always_comb begin
    done_pcmc          = '0;
    done_pcmc[PD_CFG]  = 1'b1;
    done_pcmc[PD_MCB]  = done_other[O_MCB];
    done_pcmc[PD_DMA]  = done_other[O_DMA];
    done_pcmc[PD_DMB]  = done_other[O_DMB];
    done_pcmc[PD_IC]   = done_other[O_IC];
    done_pcmc[PD_WBC]  = done_other[O_WBC];
    done_pcmc[PD_TC]   = done_other[O_TC];
    done_pcmc[PD_OUTA] = done_other[O_OUTA];
    done_pcmc[PD_OUTB] = done_other[O_OUTB];
    done_pcmc[PD_VSI]  = done_other[O_VSIA] & done_other[O_VSIB];
    done_pcmc[PD_FILA] = &done_a;
    done_pcmc[PD_FILB] = &done_b;
  end
endmodule
