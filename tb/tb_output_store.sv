// tb_output_store: the volistor-NOT output array of three counters and six
// targets. Stores are made with exactly one transmission gate on (P = 1,
// ~P = 0, all others P = 0, ~P = 1); the selected target must then hold the
// complement of the chosen rail, targets not selected must keep their state,
// and CLR0 must return all targets to LRS. A target already in HRS stays there
// (a volistor write can only clear).
module tb_output_store;
  localparam int K = 3, NTM = 6;
  logic           clk = 1'b0, clr0 = 1'b1;
  logic [K-1:0]   q_nx = '0;
  logic [2*K-1:0] p = '0, pn = '1;
  logic [NTM-1:0] tm_sel = '0, tm_state, model;
  int checks = 0, failures = 0;

  output_store #(.K(K), .NTM(NTM)) dut (.clk, .clr0, .q_nx, .p, .pn, .tm_sel, .tm_state);

  always #5 clk = ~clk;

  initial begin
    int g, t;
    bit rail;
    @(negedge clk);
    clr0 = 1'b0; model = '1;
    checks++;
    if (tm_state !== '1) begin failures++; $display("FAIL after CLR0"); end
    repeat (300) begin
      q_nx = K'($urandom);
      g = $urandom % (2 * K);
      t = $urandom % NTM;
      p = '0; pn = '1;
      if ($urandom % 4 != 0) begin
        p[g] = 1'b1; pn[g] = 1'b0;
        tm_sel = NTM'(1) << t;
        rail = (g % 2 == 0) ? q_nx[g/2] : ~q_nx[g/2];
        if (rail) model[t] = 1'b0;
      end else begin
        tm_sel = '0;
      end
      if ($urandom % 20 == 0) begin
        clr0 = 1'b1; model = '1;
      end
      @(negedge clk);
      clr0 = 1'b0;
      checks++;
      if (tm_state !== model) begin failures++; $display("FAIL state=%b model=%b", tm_state, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
