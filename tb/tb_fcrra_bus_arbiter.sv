// tb_fcrra_bus_arbiter -- self-checking test of the fair chance bus arbiter.
//
// Two arbiters run side by side: the default four-request one and one with
// six requests. Each requester raises its request at random and keeps it up
// until it is granted, as a bus master would. A reference model in the
// testbench keeps its own token position (advanced every enabled cycle) and
// works out the expected grant as the first requester at or after the token
// in circular order. Besides the grant of every cycle it checks the
// worst-case wait: an enabled request is granted at the latest in its N-th
// arbitration cycle, i.e. after waiting N-1 cycles. The cases the arbiter
// distinguishes (token holder granted, token holder idle and a later
// requester granted, no request, disabled) are counted and each must occur.
module tb_fcrra_bus_arbiter;

  int checks   = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic rst_n;
  logic en;

  always #5 clk = ~clk;

  logic [3:0] req4, gnt4, tok4;
  logic [5:0] req6, gnt6, tok6;

  fcrra_bus_arbiter u_dut4 (.clk(clk), .rst_n(rst_n), .en(en), .req(req4), .gnt(gnt4), .token(tok4));
  fcrra_bus_arbiter #(.N(6)) u_dut6 (.clk(clk), .rst_n(rst_n), .en(en), .req(req6), .gnt(gnt6), .token(tok6));

  // Mechanism counters (for the 4-request arbiter).
  int n_holder = 0, n_skip = 0, n_idle = 0, n_disabled = 0, n_maxwait = 0;

  // Reference state.
  int pos4 = 0, pos6 = 0;
  int wait4 [4];
  int wait6 [6];
  logic [3:0] g4_seen;
  logic [5:0] g6_seen;

  function automatic logic [31:0] model_gnt(input int n, input int pos, input logic [31:0] r, input logic e);
    model_gnt = '0;
    if (!e) return model_gnt;
    for (int k = 0; k < n; k++) begin
      if (r[(pos + k) % n]) begin
        model_gnt[(pos + k) % n] = 1'b1;
        return model_gnt;
      end
    end
  endfunction

  task automatic compare(input string name, input logic [31:0] got, input logic [31:0] exp_g);
    checks++;
    if (got !== exp_g) begin
      failures++;
      $display("FAIL %s got=%b expected=%b at %0t", name, got, exp_g, $time);
    end
  endtask

  initial begin
    rst_n = 1'b0;
    en    = 1'b0;
    req4  = '0;
    req6  = '0;
    foreach (wait4[i]) wait4[i] = 0;
    foreach (wait6[i]) wait6[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int cyc = 0; cyc < 3000; cyc++) begin
      // Drive: en mostly high; new requests appear at random, granted ones drop.
      // Every so often all requesters ask at once to reach the worst-case wait.
      en = ($urandom_range(0, 9) != 0);
      if ((cyc % 97) < 12) begin
        req4 = '1;
        req6 = '1;
      end else begin
        for (int i = 0; i < 4; i++) if (!req4[i]) req4[i] = ($urandom_range(0, 5) == 0);
        for (int i = 0; i < 6; i++) if (!req6[i]) req6[i] = ($urandom_range(0, 7) == 0);
      end
      #1;
      begin
        logic [31:0] e4, e6;
        e4 = model_gnt(4, pos4, 32'(req4), en);
        e6 = model_gnt(6, pos6, 32'(req6), en);
        compare("N=4 grant", 32'(gnt4), e4);
        compare("N=6 grant", 32'(gnt6), e6);
        compare("N=4 token", 32'(tok4), 32'(1) << pos4);
        compare("N=6 token", 32'(tok6), 32'(1) << pos6);
        if (!en) n_disabled++;
        else if (req4 == '0) n_idle++;
        else if (req4[pos4]) n_holder++;
        else n_skip++;
      end
      // Waiting time: count enabled cycles a request has waited without grant.
      for (int i = 0; i < 4; i++) begin
        if (req4[i] && en) begin
          if (gnt4[i]) begin
            if (wait4[i] == 3) n_maxwait++;
            wait4[i] = 0;
          end else begin
            wait4[i]++;
          end
          checks++;
          if (wait4[i] > 3) begin
            failures++;
            $display("FAIL N=4 req %0d waited %0d cycles (bound 3)", i, wait4[i]);
          end
        end
      end
      for (int i = 0; i < 6; i++) begin
        if (req6[i] && en) begin
          if (gnt6[i]) wait6[i] = 0;
          else wait6[i]++;
          checks++;
          if (wait6[i] > 5) begin
            failures++;
            $display("FAIL N=6 req %0d waited %0d cycles (bound 5)", i, wait6[i]);
          end
        end
      end
      g4_seen = gnt4;
      g6_seen = gnt6;
      @(posedge clk);
      if (en) begin
        pos4 = (pos4 + 1) % 4;
        pos6 = (pos6 + 1) % 6;
      end
      @(negedge clk);
      req4 &= ~g4_seen;
      req6 &= ~g6_seen;
    end

    $display("mechanisms: holder=%0d skip=%0d idle=%0d disabled=%0d max_wait=%0d",
             n_holder, n_skip, n_idle, n_disabled, n_maxwait);
    checks += 5;
    if (n_holder == 0)   begin failures++; $display("FAIL token holder never granted"); end
    if (n_skip == 0)     begin failures++; $display("FAIL grant never passed over an idle holder"); end
    if (n_idle == 0)     begin failures++; $display("FAIL no idle cycle"); end
    if (n_disabled == 0) begin failures++; $display("FAIL never disabled"); end
    if (n_maxwait == 0)  begin failures++; $display("FAIL worst-case wait never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
