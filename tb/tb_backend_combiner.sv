// tb_backend_combiner: random 1.5-bit decisions; the expected code is built
// stage by stage the way a redundant pipeline resolves, x = d*2^(w-1) + x_next
// starting from the final bit. Also checks the ideal mapping of a ramp
// through an ideal 13-stage pipeline: codes are monotonic and span 0..16383.
module tb_backend_combiner;
  import dbge_pkg::*;
  localparam int N = 13, FIRST = 6;
  logic clk = 0, rst_n = 1, in_valid = 0, fbit = 0, ov_a, ov_b;
  dec_t dec [N];
  sample_t code_a, code_b;
  int checks = 0, failures = 0;

  backend_combiner #(.NUM_STAGES(N), .FIRST(FIRST)) dut_a (
    .clk, .rst_n, .in_valid, .dec, .fbit, .out_valid(ov_a), .code(code_a));
  backend_combiner #(.NUM_STAGES(N), .FIRST(0)) dut_b (
    .clk, .rst_n, .in_valid, .dec, .fbit, .out_valid(ov_b), .code(code_b));
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ideal pipeline: v in [-1,1]
  task automatic ideal(input real v);
    real r = v;
    for (int i = 0; i < N; i++) begin
      dec[i] = (r > 0.25) ? 2'd2 : (r > -0.25) ? 2'd1 : 2'd0;
      r = 2.0 * r - (real'(int'(dec[i])) - 1.0);
    end
    fbit = (r > 0.0);
  endtask

  initial begin
    int ea, eb, prev;
    for (int i = 0; i < N; i++) dec[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      for (int i = 0; i < N; i++) dec[i] = dec_t'($urandom_range(0, 2));
      fbit = $urandom_range(0, 1);
      in_valid = 1;
      ea = int'(fbit); eb = int'(fbit);
      for (int i = N - 1; i >= 0; i--) begin
        if (i >= FIRST) ea += int'(dec[i]) << (N - 1 - i);
        eb += int'(dec[i]) << (N - 1 - i);
      end
      @(negedge clk);
      checks++;
      if (!ov_a || !ov_b || int'(code_a) != ea || int'(code_b) != eb) begin
        failures++; $display("FAIL a=%0d/%0d b=%0d/%0d", code_a, ea, code_b, eb);
      end
    end
    prev = -1;
    for (int t = 0; t <= 4000; t++) begin
      ideal(-0.99999 + 1.99998 * real'(t) / 4000.0);
      @(negedge clk);
      checks++;
      if (int'(code_b) < prev || int'(code_b) > 16383) begin failures++; $display("FAIL ramp %0d", code_b); end
      prev = int'(code_b);
    end
    checks++;
    if (prev < 16380) begin failures++; $display("FAIL ramp top %0d", prev); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
