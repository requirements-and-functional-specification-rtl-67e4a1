// tb_done_combiner: self-checking test of the DONE lines to the PCM card.
// Applies random and directed DONE patterns (all done, one chip missing in
// each group) and compares the twelve outputs with the expected mapping:
// 0 = this FPGA (always 1), 1..8 = MCB, DMA, DMB, IC, WBC, TC, OUTA, OUTB,
// 9 = VSIA and VSIB, 10 = all of bank A, 11 = all of bank B.
module tb_done_combiner;
  logic [17:0] done_a, done_b;
  logic [9:0]  done_other;
  logic [11:0] done_pcmc, exp;
  int checks = 0, failures = 0;

  done_combiner dut (.done_a, .done_b, .done_other, .done_pcmc);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [17:0] a, input logic [17:0] b, input logic [9:0] o);
    done_a = a; done_b = b; done_other = o;
    #1;
    exp[0]    = 1'b1;
    exp[8:1]  = o[7:0];
    exp[9]    = o[8] && o[9];
    exp[10]   = (a == 18'h3ffff);
    exp[11]   = (b == 18'h3ffff);
    checks++;
    if (done_pcmc !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h o=%h: got %h expected %h", a, b, o, done_pcmc, exp);
    end
  endtask

  initial begin
    apply('0, '0, '0);
    apply('1, '1, '1);
    for (int i = 0; i < 18; i++) begin
      apply(~(18'd1 << i), '1, '1);
      apply('1, ~(18'd1 << i), '1);
    end
    for (int i = 0; i < 10; i++) apply('1, '1, ~(10'd1 << i));
    for (int i = 0; i < 500; i++)
      apply(($urandom_range(0, 1) != 0) ? 18'h3ffff : 18'($urandom),
            ($urandom_range(0, 1) != 0) ? 18'h3ffff : 18'($urandom),
            10'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
