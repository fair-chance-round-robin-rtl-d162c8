// tb_fcrra_8x8 -- end-to-end self-checking test of the 8-request arbiter at
// its default size (two groups of four, no parameter override).
//
// Stimulus: random enable, random select (with runs of fixed select so that
// a group's token wraps), requests that are held until granted, and bursts
// where all eight lines request. A reference model keeps one token position
// per group, advances only the selected group's token in enabled cycles, and
// expects the grant to be the first requester of the selected group at or
// after that group's token, on the grant line of the same index.
// Checked every cycle: the whole grant vector, both tokens, and the wait of
// each request counted in cycles where its group was selected and enabled
// (bound 3). Counted, and each required at least once: disabled cycles,
// grants in group 0 and in group 1, token holder granted, token holder idle
// with a later requester granted, selected group idle while the other group
// requests, token wrap in each group, worst-case wait reached.
module tb_fcrra_8x8;

  localparam int unsigned GR = 4;
  localparam int unsigned G  = 2;

  int checks   = 0;
  int failures = 0;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       en;
  logic       sel;
  logic [7:0] req, gnt, token;
  logic [7:0] gnt_seen;

  always #5 clk = ~clk;

  fcrra_8x8 u_dut (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .sel   (sel),
    .req   (req),
    .gnt   (gnt),
    .token (token)
  );

  int pos   [G];
  int waitc [8];

  int n_disabled = 0, n_grp [G], n_holder = 0, n_skip = 0, n_other_idle = 0;
  int n_wrap [G], n_maxwait = 0;

  function automatic logic [7:0] model_gnt(input logic e, input logic s, input logic [7:0] r,
                                           input int p0, input int p1);
    int base;
    int p;
    model_gnt = '0;
    if (!e) return model_gnt;
    base = s ? GR : 0;
    p    = s ? p1 : p0;
    for (int k = 0; k < GR; k++) begin
      if (r[base + (p + k) % GR]) begin
        model_gnt[base + (p + k) % GR] = 1'b1;
        return model_gnt;
      end
    end
  endfunction

  initial begin
    rst_n = 1'b0;
    en    = 1'b0;
    sel   = 1'b0;
    req   = '0;
    for (int g = 0; g < G; g++) begin
      pos[g]    = 0;
      n_grp[g]  = 0;
      n_wrap[g] = 0;
    end
    foreach (waitc[i]) waitc[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int cyc = 0; cyc < 4000; cyc++) begin
      int phase;
      phase = cyc % 200;
      en = ($urandom_range(0, 9) != 0);
      // Phases: fixed select runs, then random select.
      if (phase < 40)       sel = 1'b0;
      else if (phase < 80)  sel = 1'b1;
      else                  sel = 1'($urandom_range(0, 1));
      if (phase >= 150 && phase < 170) begin
        req = 8'hFF;
      end else begin
        for (int i = 0; i < 8; i++) if (!req[i]) req[i] = ($urandom_range(0, 6) == 0);
      end
      #1;
      begin
        logic [7:0] exp_g;
        logic [7:0] exp_t;
        int         s;
        s     = int'(sel);
        exp_g = model_gnt(en, sel, req, pos[0], pos[1]);
        exp_t = 8'((1 << pos[0]) | (1 << (GR + pos[1])));
        checks++;
        if (gnt !== exp_g) begin
          failures++;
          $display("FAIL en=%0b sel=%0b req=%b gnt=%b expected=%b", en, sel, req, gnt, exp_g);
        end
        checks++;
        if (token !== exp_t) begin
          failures++;
          $display("FAIL token=%b expected=%b", token, exp_t);
        end
        if (!en) n_disabled++;
        else begin
          logic [GR-1:0] gr, other;
          gr    = sel ? req[7:4] : req[3:0];
          other = sel ? req[3:0] : req[7:4];
          if (gr != '0) n_grp[s]++;
          if (gr == '0 && other != '0) n_other_idle++;
          else if (gr[pos[s]]) n_holder++;
          else if (gr != '0) n_skip++;
        end
        // Wait bound per request, counted over its group's enabled slots.
        for (int i = 0; i < 8; i++) begin
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
              $display("FAIL req %0d waited %0d selected cycles (bound %0d)", i, waitc[i], GR - 1);
            end
          end
        end
        gnt_seen = gnt;
        @(posedge clk);
        if (en) begin
          if (pos[s] == GR - 1) n_wrap[s]++;
          pos[s] = (pos[s] + 1) % GR;
        end
      end
      @(negedge clk);
      req &= ~gnt_seen;
    end

    $display("mechanisms: disabled=%0d grp0=%0d grp1=%0d holder=%0d skip=%0d other_idle=%0d wrap0=%0d wrap1=%0d max_wait=%0d",
             n_disabled, n_grp[0], n_grp[1], n_holder, n_skip, n_other_idle, n_wrap[0], n_wrap[1], n_maxwait);
    checks += 9;
    if (n_disabled == 0)   begin failures++; $display("FAIL never disabled"); end
    if (n_grp[0] == 0)     begin failures++; $display("FAIL group 0 never granted"); end
    if (n_grp[1] == 0)     begin failures++; $display("FAIL group 1 never granted"); end
    if (n_holder == 0)     begin failures++; $display("FAIL token holder never granted"); end
    if (n_skip == 0)       begin failures++; $display("FAIL grant never passed over an idle holder"); end
    if (n_other_idle == 0) begin failures++; $display("FAIL selected group never idle while the other requested"); end
    if (n_wrap[0] == 0)    begin failures++; $display("FAIL group 0 token never wrapped"); end
    if (n_wrap[1] == 0)    begin failures++; $display("FAIL group 1 token never wrapped"); end
    if (n_maxwait == 0)    begin failures++; $display("FAIL worst-case wait never reached"); end
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
