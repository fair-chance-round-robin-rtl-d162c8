// tb_fcrra_ring_counter -- self-checking test of the token ring.
//
// Checks the reset value (token at 0), that the token moves one position
// per clock with advance high and wraps from N-1 to 0, and that it holds
// with advance low. A separate counter in the testbench tracks the expected
// position. Run for N=4 and N=5.
module tb_fcrra_ring_counter;

  int checks   = 0;
  int failures = 0;
  int wraps    = 0;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       advance;
  logic [3:0] token4;
  logic [4:0] token5;

  always #5 clk = ~clk;

  fcrra_ring_counter #(.N(4)) u_dut4 (.clk(clk), .rst_n(rst_n), .advance(advance), .token(token4));
  fcrra_ring_counter #(.N(5)) u_dut5 (.clk(clk), .rst_n(rst_n), .advance(advance), .token(token5));

  int pos4, pos5;

  task automatic check_tokens();
    checks++;
    if (token4 !== 4'(1 << pos4)) begin
      failures++;
      $display("FAIL N=4 token=%b expected position %0d", token4, pos4);
    end
    checks++;
    if (token5 !== 5'(1 << pos5)) begin
      failures++;
      $display("FAIL N=5 token=%b expected position %0d", token5, pos5);
    end
  endtask

  initial begin
    rst_n   = 1'b0;
    advance = 1'b0;
    pos4    = 0;
    pos5    = 0;
    repeat (2) @(posedge clk);
    #1 check_tokens();
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 200; cyc++) begin
      @(negedge clk);
      advance = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (advance) begin
        if (pos4 == 3) wraps++;
        pos4 = (pos4 + 1) % 4;
        pos5 = (pos5 + 1) % 5;
      end
      #1 check_tokens();
    end
    // Reset in mid-run returns the token to position 0.
    @(negedge clk) rst_n = 1'b0;
    pos4 = 0;
    pos5 = 0;
    #1 check_tokens();
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL token never wrapped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
