// tb_serial_divider: random and corner-case divisions against the
// simulator's own / and % operators; checks the NW+1 cycle latency.
module tb_serial_divider;
  localparam int NW = 25, DWID = 18;
  logic clk = 0, rst_n = 1, start = 0, busy, done;
  logic [NW-1:0] dividend, quotient;
  logic [DWID-1:0] divisor, remainder;
  int checks = 0, failures = 0;

  serial_divider #(.NW(NW), .DWID(DWID)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [NW-1:0] a, input logic [DWID-1:0] b);
    int cyc = 0;
    @(negedge clk); dividend = a; divisor = b; start = 1;
    @(negedge clk); start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != NW + 1) begin failures++; $display("latency %0d expected %0d", cyc, NW + 1); end
    if (b != 0) begin
      checks++;
      if (quotient != a / NW'(b) || remainder != DWID'(a % NW'(b))) begin
        failures++;
        $display("FAIL %0d / %0d -> q=%0d r=%0d", a, b, quotient, remainder);
      end
    end else begin
      checks++;
      if (quotient != '1) begin failures++; $display("FAIL divide by zero q=%0h", quotient); end
    end
  endtask

  initial begin
    dividend = 0; divisor = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0, 5); run(100, 7); run(25'h1FFFFFF, 1); run(25'h1FFFFFF, 18'h3FFFF); run(37, 0);
    for (int i = 0; i < 200; i++) run(NW'($urandom), DWID'($urandom_range(1, 262143)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
