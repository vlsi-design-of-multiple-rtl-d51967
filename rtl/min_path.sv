// min_path: minimum path decision over N path metrics.
//
// A balanced comparison tree returns the smallest value and its index. On a
// tie the lower index wins (this design's choice). N must be a power of two,
// at least 2. Purely combinational; log2(N) comparator levels.
module min_path #(
  parameter int N = 8,
  parameter int W = 10
) (
  input  logic [W-1:0]         val [N],
  output logic [W-1:0]         min_val,
  output logic [$clog2(N)-1:0] min_idx
);

  localparam int L = $clog2(N);

  // Level l holds N >> l candidates.
  logic [W-1:0] lv_val [L+1][N];
  logic [L-1:0] lv_idx [L+1][N];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      lv_val[0][i] = val[i];
      lv_idx[0][i] = L'(i);
    end
    for (int l = 1; l <= L; l++) begin
      for (int i = 0; i < N; i++) begin
        lv_val[l][i] = '0;
        lv_idx[l][i] = '0;
      end
      for (int i = 0; i < (N >> l); i++) begin
        if (lv_val[l-1][2*i+1] < lv_val[l-1][2*i]) begin
          lv_val[l][i] = lv_val[l-1][2*i+1];
          lv_idx[l][i] = lv_idx[l-1][2*i+1];
        end else begin
          lv_val[l][i] = lv_val[l-1][2*i];
          lv_idx[l][i] = lv_idx[l-1][2*i];
        end
      end
    end
    min_val = lv_val[L][0];
    min_idx = lv_idx[L][0];
  end

endmodule
