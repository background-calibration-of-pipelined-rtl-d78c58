// tb_block_controller: with gaps in in_valid, checks that every block tags
// exactly BLOCK_LEN valid samples, that eval follows the last tagged sample
// after DRAIN cycles, that the next clear waits for all_done, and that
// cal_en = 0 stops after the current block. update must pulse once per block,
// in the cycle all_done is first seen after eval.
module tb_block_controller;
  localparam int BLOCK_LEN = 37, DRAIN = 5;
  logic clk = 0, rst_n = 1, cal_en = 0, in_valid = 0, all_done = 0;
  logic clear, collect, eval, update;
  logic [15:0] block_count;
  int checks = 0, failures = 0;

  block_controller #(.BLOCK_LEN(BLOCK_LEN), .DRAIN(DRAIN)) dut (.*);
  always #5 clk = ~clk;
  initial #1 rst_n = 0;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ntag = 0, last_tag = 0, cyc = 0, evals = 0, clears = 0, eval_at = 0, updates = 0;
  logic done_q = 0;
  always @(posedge clk) begin
    cyc++;
    if (collect && in_valid) begin ntag++; last_tag = cyc; end
    if (clear) begin
      clears++;
      checks++;
      if (clears > 1 && (ntag != BLOCK_LEN * (clears - 1))) begin
        failures++; $display("FAIL tagged %0d before clear %0d", ntag, clears);
      end
      if (clears > 1 && cyc - eval_at < 4) begin failures++; $display("FAIL clear did not wait for done"); end
    end
    checks++;
    if (update != (all_done && !done_q && evals > updates)) begin
      failures++; $display("FAIL update=%0d at cycle %0d", update, cyc);
    end
    if (update) updates++;
    done_q = all_done;
    if (eval) begin
      evals++; eval_at = cyc;
      checks++;
      if (cyc - last_tag != DRAIN + 1) begin failures++; $display("FAIL eval %0d cycles after last tag", cyc - last_tag); end
    end
  end

  // estimators report done 4 cycles after eval
  initial begin
    forever begin
      @(posedge clk);
      if (eval) begin
        repeat (4) @(posedge clk);
        all_done <= 1;
        do @(posedge clk); while (!clear && cal_en);
        all_done <= 0;
      end
    end
  end

  always @(negedge clk) in_valid <= ($urandom_range(0, 3) != 0);

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    cal_en = 1;
    wait (block_count == 3);
    @(negedge clk); cal_en = 0;
    repeat (200) @(negedge clk);
    checks++;
    if (block_count != 4 || evals != 4 || updates != 4 || collect) begin
      failures++; $display("FAIL freeze: blocks=%0d evals=%0d", block_count, evals);
    end
    $display("blocks=%0d clears=%0d evals=%0d", block_count, clears, evals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
