// tb_nx_xbar_datapath: self-checking test of the stacked 36-bit datapath.
// Random partial permutations are set up with matching split and merge
// codes; every connected output must carry its input's full data word and
// tail, unconnected outputs must be idle, and the tail copies (in_last,
// out_last) must pulse exactly for words with tail=1 that complete.
module tb_nx_xbar_datapath;
  import nexus_pkg::*;
  localparam int N = 16, DW = 36;
  logic [N-1:0][3:0] sa, sb, ma, mb;
  logic [N-1:0] in_valid, in_ready, in_tail, out_valid, out_ready, out_tail, in_last, out_last;
  logic [N-1:0][DW-1:0] in_data, out_data;
  int checks = 0, failures = 0;

  nx_xbar_datapath #(.NPORTS(N), .DATA_W(DW)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000; failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int perm[N], src[N];
    bit conn[N];
    for (int it = 0; it < 200; it++) begin
      for (int p = 0; p < N; p++) perm[p] = p;
      perm.shuffle();
      for (int j = 0; j < N; j++) src[j] = -1;
      for (int i = 0; i < N; i++) begin
        conn[i] = ($urandom % 5) != 0;
        sa[i] = conn[i] ? e1of4_enc(2'(perm[i] % 4)) : '0;
        sb[i] = conn[i] ? e1of4_enc(2'(perm[i] / 4)) : '0;
        if (conn[i]) src[perm[i]] = i;
        in_valid[i] = 1'($urandom); in_tail[i] = 1'($urandom);
        in_data[i]  = {4'($urandom), $urandom};
        out_ready[i] = 1'($urandom);
      end
      for (int j = 0; j < N; j++) begin
        ma[j] = (src[j] >= 0) ? e1of4_enc(2'(src[j] % 4)) : '0;
        mb[j] = (src[j] >= 0) ? e1of4_enc(2'(src[j] / 4)) : '0;
      end
      #1;
      for (int j = 0; j < N; j++) begin
        if (src[j] >= 0) begin
          int i;
          i = src[j];
          check(out_valid[j] == in_valid[i], "valid not routed");
          check(out_data[j] == in_data[i] && out_tail[j] == in_tail[i],
                $sformatf("out %0d data %h exp %h", j, out_data[j], in_data[i]));
          check(in_ready[i] == out_ready[j], "ready not routed back");
          check(out_last[j] == (in_valid[i] && out_ready[j] && in_tail[i]), "out_last");
          check(in_last[i] == out_last[j], "in_last");
        end else begin
          check(out_valid[j] == 0 && out_data[j] == '0, "idle output active");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
