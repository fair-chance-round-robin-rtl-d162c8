// tb_fcrra_priority_logic -- exhaustive self-checking test of the rotated
// priority block.
//
// Four instances with N=4 and HIGH=0..3 (the four blocks of a 4-request bus
// arbiter) and one with N=5, HIGH=3 see every request pattern with the
// enable low and high. The expected grant is the requester whose circular
// distance from HIGH, (i - HIGH) mod N, is smallest; nothing when disabled
// or when no request is set.
module tb_fcrra_priority_logic;

  localparam int unsigned N = 4;

  int checks   = 0;
  int failures = 0;

  logic         en;
  logic [N-1:0] req;
  logic [N-1:0] gnt [N];
  logic [4:0]   req5;
  logic [4:0]   gnt5;

  for (genvar h = 0; h < N; h++) begin : g_dut
    fcrra_priority_logic #(.N(N), .HIGH(h)) u_dut (.en(en), .req(req), .gnt(gnt[h]));
  end

  fcrra_priority_logic #(.N(5), .HIGH(3)) u_dut5 (.en(en), .req(req5), .gnt(gnt5));

  function automatic logic [31:0] expect_gnt(input int n, input int high,
                                             input logic [31:0] r, input logic e);
    int best_d = n;
    int best_i = -1;
    expect_gnt = '0;
    if (!e) return expect_gnt;
    for (int i = 0; i < n; i++) begin
      int d = (i - high + n) % n;
      if (r[i] && d < best_d) begin
        best_d = d;
        best_i = i;
      end
    end
    if (best_i >= 0) expect_gnt[best_i] = 1'b1;
  endfunction

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int r = 0; r < 32; r++) begin
        en   = e[0];
        req  = r[N-1:0];
        req5 = r[4:0];
        #1;
        for (int h = 0; h < N; h++) begin
          logic [31:0] exp_g;
          exp_g = expect_gnt(N, h, 32'(req), en);
          checks++;
          if (gnt[h] !== exp_g[N-1:0]) begin
            failures++;
            $display("FAIL HIGH=%0d en=%0b req=%b gnt=%b expected=%b", h, en, req, gnt[h], exp_g[N-1:0]);
          end
        end
        begin
          logic [31:0] exp5;
          exp5 = expect_gnt(5, 3, 32'(req5), en);
          checks++;
          if (gnt5 !== exp5[4:0]) begin
            failures++;
            $display("FAIL N=5 HIGH=3 en=%0b req=%b gnt=%b expected=%b", en, req5, gnt5, exp5[4:0]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
