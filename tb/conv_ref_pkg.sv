// Reference model of one convolutional layer as the accelerator streams it.
//
// build_layer() draws random input feature maps and weights and returns
//  - in_q:   the input stream, tile by tile in the order row, col, to, ti; per
//            tile the Tn input-map tiles ((Tr-1)*S+K rows of (Tc-1)*S+K words)
//            then the Tm x Tn kernels of K*K words, out-of-layer words as +0;
//  - exp_q:  the expected output stream, Tm x Tr x Tc words per output tile in
//            the order row, col, to; care_q marks the words of real pixels.
// Each output pixel is accumulated in the datapath's order of floating-point
// operations: for each ti tile and each (i, j), the Tn products are summed by a
// binary tree and added to the running sum, the first one replacing it.
package conv_ref_pkg;
  import fp_ref_pkg::*;

  function automatic int cdiv(int a, int b);
    return (a + b - 1) / b;
  endfunction

  function automatic void build_layer(input int TM, TN, TR, TC, R, C, M, N, K, S,
                                      output word_t in_q[$], output word_t exp_q[$],
                                      output bit care_q[$]);
    int H = (R - 1) * S + K;
    int W = (C - 1) * S + K;
    int IH = (TR - 1) * S + K;
    int IW = (TC - 1) * S + K;
    word_t ifm[];
    word_t wts[];
    word_t leaves[$];
    word_t acc, t, xv, wv;
    int n, m, r, c;
    bit first;
    ifm = new[N * H * W];
    wts = new[M * N * K * K];
    foreach (ifm[k]) ifm[k] = rand_fp();
    foreach (wts[k]) wts[k] = rand_fp();
    in_q = {};
    exp_q = {};
    care_q = {};
    for (int rt = 0; rt < cdiv(R, TR); rt++)
      for (int ct = 0; ct < cdiv(C, TC); ct++)
        for (int mt = 0; mt < cdiv(M, TM); mt++) begin
          for (int nt = 0; nt < cdiv(N, TN); nt++) begin
            for (int tii = 0; tii < TN; tii++)
              for (int y = 0; y < IH; y++)
                for (int x = 0; x < IW; x++) begin
                  int gy = rt * TR * S + y;
                  int gx = ct * TC * S + x;
                  n = nt * TN + tii;
                  in_q.push_back((n < N && gy < H && gx < W) ? ifm[(n * H + gy) * W + gx] : 32'h0);
                end
            for (int too = 0; too < TM; too++)
              for (int tii = 0; tii < TN; tii++)
                for (int k = 0; k < K * K; k++) begin
                  m = mt * TM + too;
                  n = nt * TN + tii;
                  in_q.push_back((m < M && n < N) ? wts[(m * N + n) * K * K + k] : 32'h0);
                end
          end
          for (int too = 0; too < TM; too++)
            for (int trr = 0; trr < TR; trr++)
              for (int tcc = 0; tcc < TC; tcc++) begin
                m = mt * TM + too;
                r = rt * TR + trr;
                c = ct * TC + tcc;
                if (m < M && r < R && c < C) begin
                  acc = 32'h0;
                  for (int nt = 0; nt < cdiv(N, TN); nt++)
                    for (int i = 0; i < K; i++)
                      for (int j = 0; j < K; j++) begin
                        leaves = {};
                        for (int tii = 0; tii < TN; tii++) begin
                          n = nt * TN + tii;
                          xv = (n < N) ? ifm[(n * H + S * r + i) * W + S * c + j] : 32'h0;
                          wv = (n < N) ? wts[((m * N + n) * K + i) * K + j] : 32'h0;
                          leaves.push_back(fmul_ref(xv, wv));
                        end
                        t = tree_ref(leaves);
                        first = (nt == 0 && i == 0 && j == 0);
                        acc = first ? t : fadd_ref(t, acc);
                      end
                  exp_q.push_back(acc);
                  care_q.push_back(1'b1);
                end else begin
                  exp_q.push_back(32'h0);
                  care_q.push_back(1'b0);
                end
              end
        end
  endfunction

endpackage
