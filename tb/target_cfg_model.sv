// target_cfg_model: behavioural model of the configuration port of one
// Station Board FPGA, for testbenches only (not synthesizable logic).
//
// PROG_B low clears the device (DONE low, configuration lost); its rising
// edge starts a configuration. The model then takes one byte from CDATA on
// every rising CCLK edge while the bus is driven (cdata_oe), compares it with
// the test bitstream byte_of(n), and after NBYTES bytes raises DONE if every
// byte matched. INIT_B is not modelled, as the board does not monitor it.
// n_configs counts completed configurations and n_bad mismatched bytes.
module target_cfg_model #(
  parameter int NBYTES = 16
) (
  input  logic       prog_b,
  input  logic       cclk,
  input  logic [7:0] cdata,
  input  logic       cdata_oe,
  output logic       done,
  output int         n_configs,
  output int         n_bad
);
  function automatic logic [7:0] byte_of(input int n);
    return 8'((n * 37 + 11) ^ (n >> 3));
  endfunction

  logic loading = 0;
  int   count = 0;
  logic bad = 0;

  initial begin
    done = 0;
    n_configs = 0;
    n_bad = 0;
  end

  always @(negedge prog_b) begin
    done    = 0;
    loading = 0;
  end

  // edges from the initial value at time 0 are not real PROG pulses
  always @(posedge prog_b) begin
    if ($time != 0) begin
      loading = 1;
      count   = 0;
      bad     = 0;
    end
  end

  always @(posedge cclk) begin
    if (loading && cdata_oe && prog_b) begin
      if (cdata != byte_of(count)) begin
        bad = 1;
        n_bad++;
      end
      count++;
      if (count == NBYTES) begin
        loading = 0;
        done    = !bad;
        n_configs++;
      end
    end
  end
endmodule
