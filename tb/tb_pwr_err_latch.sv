// tb_pwr_err_latch: self-checking test of the sticky power-error bits.
// Drives random power-good patterns (mostly high, with dips) and random
// clearing reads, and compares err every cycle with a reference computed in
// the testbench: a bit is set one clock after its line falls and cleared by a
// read unless a new fall arrives in the same cycle. Also checks directed
// cases: a dip that recovers stays reported, a read clears, a level that
// stays low after a read does not re-report.
module tb_pwr_err_latch;
  localparam int N = 10;
  logic clk = 0, rst = 1;
  logic [N-1:0] stat, err;
  logic rd_clr;
  int checks = 0, failures = 0;

  pwr_err_latch #(.N(N)) dut (.clk, .rst, .stat, .rd_clr, .err);

  always #5 clk = ~clk;

  logic [N-1:0] prev_m, err_m;

  task automatic chk(input logic [N-1:0] exp, input string what);
    checks++;
    if (err !== exp) begin
      failures++;
      $display("FAIL %s: err=%h expected %h", what, err, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    stat = '0; rd_clr = 0; prev_m = '0; err_m = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    chk('0, "after reset");
    // ramp-up of supplies must not report an error
    @(negedge clk) stat = '1;
    @(negedge clk); chk('0, "power-up ramp");
    // directed: 5V dips for one cycle and recovers
    @(negedge clk) stat[0] = 0;
    chk('0, "before edge");
    @(negedge clk) stat[0] = 1;
    chk(10'h001, "dip one clock later");
    repeat (3) @(negedge clk);
    chk(10'h001, "dip is sticky");
    rd_clr = 1;
    @(negedge clk) rd_clr = 0;
    chk('0, "read clears");
    // level stays low across a read: reported once only
    stat[9] = 0;
    @(negedge clk); chk(10'h200, "1V2A fell");
    rd_clr = 1;
    @(negedge clk) rd_clr = 0;
    repeat (2) @(negedge clk);
    chk('0, "no re-report while low");
    stat[9] = 1;
    @(negedge clk);
    // fall in the same cycle as a clearing read wins
    stat[3] = 0; rd_clr = 1;
    @(negedge clk) rd_clr = 0; stat[3] = 1;
    chk(10'h008, "set beats clear");
    rd_clr = 1;
    @(negedge clk) rd_clr = 0;
    chk('0, "cleared");

    // random phase against a reference model
    prev_m = stat; err_m = '0;
    for (int i = 0; i < 2000; i++) begin
      logic [N-1:0] nstat;
      logic nclr;
      for (int b = 0; b < N; b++) nstat[b] = ($urandom_range(0, 9) != 0);
      nclr = ($urandom_range(0, 7) == 0);
      stat = nstat; rd_clr = nclr;
      @(posedge clk);
      err_m  = (nclr ? '0 : err_m) | (prev_m & ~nstat);
      prev_m = nstat;
      @(negedge clk);
      chk(err_m, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
