// tb_fcrra_mxm -- self-checking test of the grouped arbiter at a larger
// size: four groups of four requests (16 lines, a 2-bit select).
//
// Same method as the 8-request test: a reference model keeps one token
// position per group, advances only the selected group's token in enabled
// cycles, and expects the first requester of the selected group at or after
// its token to be granted. Requests are held until granted. Checked every
// cycle: grant vector, all tokens, and the per-request wait in selected,
// enabled cycles (bound GROUP_REQS-1). Every group must be granted at least
// once and the worst-case wait must be reached.
module tb_fcrra_mxm;

  localparam int unsigned GR = 4;
  localparam int unsigned G  = 4;
  localparam int unsigned M  = GR * G;

  int checks   = 0;
  int failures = 0;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         en;
  logic [1:0]   sel;
  logic [M-1:0] req, gnt, token, gnt_seen;

  always #5 clk = ~clk;

  fcrra_8x8 #(.GROUP_REQS(GR), .GROUPS(G)) u_dut (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .sel   (sel),
    .req   (req),
    .gnt   (gnt),
    .token (token)
  );

  int pos   [G];
  int waitc [M];
  int n_grp [G];
  int n_maxwait = 0;

  initial begin
    rst_n = 1'b0;
    en    = 1'b0;
    sel   = '0;
    req   = '0;
    foreach (pos[g])   begin pos[g] = 0; n_grp[g] = 0; end
    foreach (waitc[i]) waitc[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int cyc = 0; cyc < 4000; cyc++) begin
      logic [M-1:0] exp_g, exp_t;
      int           s;
      en  = ($urandom_range(0, 7) != 0);
      sel = 2'($urandom_range(0, 3));
      s   = int'(sel);
      if ((cyc % 150) < 15) req = '1;
      else for (int i = 0; i < M; i++) if (!req[i]) req[i] = ($urandom_range(0, 9) == 0);
      #1;
      exp_g = '0;
      exp_t = '0;
      for (int g = 0; g < G; g++) exp_t[g*GR + pos[g]] = 1'b1;
      if (en) begin
        for (int k = GR - 1; k >= 0; k--) begin
          // Scan backwards so that the smallest circular distance wins last.
          int idx;
          idx = s*GR + (pos[s] + k) % GR;
          if (req[idx]) begin
            exp_g      = '0;
            exp_g[idx] = 1'b1;
          end
        end
      end
      checks++;
      if (gnt !== exp_g) begin
        failures++;
        $display("FAIL en=%0b sel=%0d req=%h gnt=%h expected=%h", en, sel, req, gnt, exp_g);
      end
      checks++;
      if (token !== exp_t) begin
        failures++;
        $display("FAIL token=%h expected=%h", token, exp_t);
      end
      if (en && gnt != '0) n_grp[s]++;
      for (int i = 0; i < M; i++) begin
        if (req[i] && en && (i / GR) == s) begin
          if (gnt[i]) begin
            if (waitc[i] == GR - 1) n_maxwait++;
            waitc[i] = 0;
          end else begin
            waitc[i]++;
          end
          checks++;
          if (waitc[i] > GR - 1) begin
            failures++;
            $display("FAIL req %0d waited %0d selected cycles", i, waitc[i]);
          end
        end
      end
      gnt_seen = gnt;
      @(posedge clk);
      if (en) pos[s] = (pos[s] + 1) % GR;
      @(negedge clk);
      req &= ~gnt_seen;
    end

    for (int g = 0; g < G; g++) begin
      checks++;
      if (n_grp[g] == 0) begin failures++; $display("FAIL group %0d never granted", g); end
    end
    checks++;
    if (n_maxwait == 0) begin failures++; $display("FAIL worst-case wait never reached"); end
    $display("groups granted: %0d %0d %0d %0d, worst-case waits: %0d", n_grp[0], n_grp[1], n_grp[2], n_grp[3], n_maxwait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
