// tb_nx_xbar_grid: self-checking test of one crossbar grid slice.
// Random split and merge port numbers (some neutral) are encoded as pairs of
// 1-of-4 codes; the outputs are compared with a reference computed from the
// binary port numbers: column j gets row i's data and valid exactly when
// row i wants j and column j wants i, and row i's ack follows column j's
// ready in that case only.
module tb_nx_xbar_grid;
  import nexus_pkg::*;
  localparam int N = 16, W = 4;
  logic [N-1:0][3:0] sa, sb, ma, mb;
  logic [N-1:0][W-1:0] l_data, r_data;
  logic [N-1:0] l_valid, l_ack, r_valid, r_ready;
  int checks = 0, failures = 0;

  nx_xbar_grid #(.NPORTS(N), .W(W)) dut (.*);

  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int s[N], m[N];
    bit sv[N], mv[N];
    for (int it = 0; it < 300; it++) begin
      for (int p = 0; p < N; p++) begin
        s[p] = $urandom % N; m[p] = $urandom % N;
        sv[p] = ($urandom % 4) != 0; mv[p] = ($urandom % 4) != 0;
        // half the time make the merges match the splits (a permutation-like setting)
        sa[p] = sv[p] ? e1of4_enc(2'(s[p] % 4)) : '0;
        sb[p] = sv[p] ? e1of4_enc(2'(s[p] / 4)) : '0;
        l_data[p] = 4'($urandom); l_valid[p] = 1'($urandom); r_ready[p] = 1'($urandom);
      end
      if (it % 2 == 0)
        for (int p = 0; p < N; p++) if (sv[p]) begin m[s[p]] = p; mv[s[p]] = 1; end
      for (int p = 0; p < N; p++) begin
        ma[p] = mv[p] ? e1of4_enc(2'(m[p] % 4)) : '0;
        mb[p] = mv[p] ? e1of4_enc(2'(m[p] / 4)) : '0;
      end
      #1;
      for (int j = 0; j < N; j++) begin
        logic [W-1:0] ed; logic ev;
        ed = '0; ev = 0;
        for (int i = 0; i < N; i++)
          if (sv[i] && mv[j] && s[i] == j && m[j] == i) begin ed |= l_data[i]; ev |= l_valid[i]; end
        checks++;
        if (r_data[j] !== ed || r_valid[j] !== ev) begin
          failures++; $display("FAIL col %0d: data %h/%h valid %b/%b", j, r_data[j], ed, r_valid[j], ev);
        end
      end
      for (int i = 0; i < N; i++) begin
        logic ea;
        ea = 0;
        for (int j = 0; j < N; j++)
          if (sv[i] && mv[j] && s[i] == j && m[j] == i) ea |= r_ready[j];
        checks++;
        if (l_ack[i] !== ea) begin failures++; $display("FAIL row %0d ack %b exp %b", i, l_ack[i], ea); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
