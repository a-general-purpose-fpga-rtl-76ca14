// tb_injection_builder: random element currents scattered into a 6-row b by
// random row indices (some of them ground or out of range). Each row is
// compared with the sum worked out in the bench: +j at p and -j at q for
// lumped elements and switches, +j at each end row for line modes and
// sources. b must hold between build pulses.
`timescale 1ns/1ps
module tb_injection_builder;
  import rts_pkg::*;
  localparam int M = 6, NL = 3, NW = 2, NT = 2, NS = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic build = 0;
  idx_t lump_p [NL], lump_q [NL], sw_p [NW], sw_q [NW], tl_bk [NT], tl_bm [NT], src_b [NS];
  fx_t  lump_j [NL], sw_j [NW], tl_jk [NT], tl_jm [NT], src_j [NS];
  fx_t  b [M];
  injection_builder #(.M_B(M), .N_LUMP(NL), .N_SW(NW), .N_TL(NT), .N_SRC(NS)) dut (.*);

  function automatic int rint(int span);
    int v;
    v = $urandom_range(span);
    return v;
  endfunction
  function automatic idx_t ridx();
    int r;
    r = rint(8);
    return (r == 8) ? IDX_NONE : idx_t'(r);   // 6 and 7 are beyond the vector
  endfunction
  function automatic fx_t rj(); return fx_t'(longint'(rint(2000000)) - 64'd1000000) <<< 20; endfunction

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e [M];
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      for (int k = 0; k < NL; k++) begin lump_p[k] = ridx(); lump_q[k] = ridx(); lump_j[k] = rj(); end
      for (int k = 0; k < NW; k++) begin sw_p[k] = ridx(); sw_q[k] = ridx(); sw_j[k] = rj(); end
      for (int k = 0; k < NT; k++) begin tl_bk[k] = ridx(); tl_bm[k] = ridx(); tl_jk[k] = rj(); tl_jm[k] = rj(); end
      for (int k = 0; k < NS; k++) begin src_b[k] = ridx(); src_j[k] = rj(); end
      for (int r = 0; r < M; r++) e[r] = 0;
      for (int k = 0; k < NL; k++) begin
        if (lump_p[k] < M) e[lump_p[k]] += lump_j[k];
        if (lump_q[k] < M) e[lump_q[k]] -= lump_j[k];
      end
      for (int k = 0; k < NW; k++) begin
        if (sw_p[k] < M) e[sw_p[k]] += sw_j[k];
        if (sw_q[k] < M) e[sw_q[k]] -= sw_j[k];
      end
      for (int k = 0; k < NT; k++) begin
        if (tl_bk[k] < M) e[tl_bk[k]] += tl_jk[k];
        if (tl_bm[k] < M) e[tl_bm[k]] += tl_jm[k];
      end
      for (int k = 0; k < NS; k++) if (src_b[k] < M) e[src_b[k]] += src_j[k];
      @(negedge clk); build = 1; @(negedge clk); build = 0;
      // inputs change, b must hold
      for (int k = 0; k < NS; k++) src_j[k] = rj();
      @(negedge clk);
      for (int r = 0; r < M; r++) begin
        checks++;
        if (b[r] != e[r]) begin failures++; $display("FAIL row %0d: %0d vs %0d", r, b[r], e[r]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
