// tb_sync_bits: self-checking test of the status synchroniser.
// Drives random words and checks that q equals the input applied STAGES
// clock edges earlier, and that reset clears the output.
module tb_sync_bits;
  localparam int W = 12, S = 3;
  logic clk = 0, rst = 1;
  logic [W-1:0] d = '0, q;
  logic [W-1:0] hist [S];
  int checks = 0, failures = 0;

  sync_bits #(.WIDTH(W), .STAGES(S)) dut (.clk, .rst, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < S; i++) hist[i] = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("FAIL q not cleared by reset"); end
    rst = 0;
    for (int n = 0; n < 500; n++) begin
      d = W'($urandom);
      @(posedge clk);
      for (int i = S - 1; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = d;
      @(negedge clk);
      checks++;
      if (q !== hist[S-1]) begin
        failures++;
        $display("FAIL cycle %0d: q=%h expected %h", n, q, hist[S-1]);
      end
    end
    rst = 1;
    @(negedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
