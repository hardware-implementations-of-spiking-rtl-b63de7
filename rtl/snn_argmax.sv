// snn_argmax: pairwise comparison tree that returns the index of the largest
// of N unsigned counts (the network's classification).  Level by level,
// neighbouring entries are compared and the larger (on a tie, the one with
// the lower index) moves up, until one remains.  Purely combinational.
// The tie rule is this design's choice.
module snn_argmax #(
  parameter int N  = 10,
  parameter int CW = 5
) (
  input  logic [CW-1:0]        counts [N],
  output logic [$clog2(N)-1:0] idx,
  output logic [CW-1:0]        max_count
);
  localparam int L  = $clog2(N);
  localparam int NP = 1 << L;                 // padded to a power of two
  localparam int IW = (L > 0) ? L : 1;

  logic [CW-1:0] val [L+1][NP];
  logic [IW-1:0] ix  [L+1][NP];

  always_comb begin
    for (int i = 0; i < NP; i++) begin
      val[0][i] = (i < N) ? counts[i] : '0;
      ix[0][i]  = IW'(i);
    end
    for (int l = 1; l <= L; l++)
      for (int i = 0; i < NP; i++) begin
        if (i < (NP >> l)) begin
          if (val[l-1][2*i+1] > val[l-1][2*i]) begin
            val[l][i] = val[l-1][2*i+1]; ix[l][i] = ix[l-1][2*i+1];
          end else begin
            val[l][i] = val[l-1][2*i];   ix[l][i] = ix[l-1][2*i];
          end
        end else begin
          val[l][i] = '0; ix[l][i] = '0;
        end
      end
  end

  assign idx       = ix[L][0][L-1:0];
  assign max_count = val[L][0];
endmodule
