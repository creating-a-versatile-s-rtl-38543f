// AES MixColumns on the whole 4x4 state, assembled from 2x2 GF(2^8) matrix
// products.
//
// The result is M x S with the AES matrix M = [2 3 1 1; 1 2 3 1; 1 1 2 3;
// 3 1 1 2] and S the state (S[r][c] = byte r + 4c). Both are split into 2x2
// blocks, so each output block is C_IJ = M_I0 x S_0J ^ M_I1 x S_1J: eight
// mix_column_2x2 instances and a Feynman gate per output block to add the
// two partial products. Purely combinational. The AES matrix is standard; using
// the 2x2 block to build it is this design's choice.
module mix_columns
  import dsbox_pkg::*;
(
  input  state_t s_in,
  output state_t s_out
);
  localparam logic [7:0] M [4][4] = '{
    '{8'h02, 8'h03, 8'h01, 8'h01},
    '{8'h01, 8'h02, 8'h03, 8'h01},
    '{8'h01, 8'h01, 8'h02, 8'h03},
    '{8'h03, 8'h01, 8'h01, 8'h02}
  };

  for (genvar bi = 0; bi < 2; bi++) begin : g_i
    for (genvar bj = 0; bj < 2; bj++) begin : g_j
      logic [7:0] part [2][4];   // partial 2x2 product for k = 0, 1
      for (genvar bk = 0; bk < 2; bk++) begin : g_k
        mix_column_2x2 u_blk (
          .a1(M[2*bi][2*bk]),   .a2(M[2*bi][2*bk+1]),
          .a3(M[2*bi+1][2*bk]), .a4(M[2*bi+1][2*bk+1]),
          .b1(s_in[(2*bk)   + 4*(2*bj)]),
          .b2(s_in[(2*bk+1) + 4*(2*bj)]),
          .b3(s_in[(2*bk)   + 4*(2*bj+1)]),
          .b4(s_in[(2*bk+1) + 4*(2*bj+1)]),
          .c1(part[bk][0]), .c2(part[bk][1]), .c3(part[bk][2]), .c4(part[bk][3])
        );
      end
      logic [31:0] pass;
      feynman_gate #(.W(32)) u_sum (
        .a({part[0][0], part[0][1], part[0][2], part[0][3]}),
        .b({part[1][0], part[1][1], part[1][2], part[1][3]}),
        .p(pass),
        .q({s_out[(2*bi)   + 4*(2*bj)], s_out[(2*bi)   + 4*(2*bj+1)],
            s_out[(2*bi+1) + 4*(2*bj)], s_out[(2*bi+1) + 4*(2*bj+1)]})
      );
    end
  end
endmodule
