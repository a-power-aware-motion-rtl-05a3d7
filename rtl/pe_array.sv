// pe_array: N x N processing elements with column accumulation.
//
// PE(x,y) holds current-block pixel R(x,y). Reference pixels move up one
// row on every shift: the bottom row takes bot_in (from the shift
// register array), the top row leaves on top_out. Down each column the
// PEs form an adder chain (the semi-systolic part), so the bottom of
// column x carries sum_y CSM(x,y)*|S - R| for the window currently held;
// it is registered in col_sum when acc_en is high. The parallel adder
// tree adds the N column sums.
//
// Interface: cmb_we/cmb_idx/cmb_pix load R (index y*N + x); csm bit
// y*N + x enables PE(x,y); shift/bot_in/top_out move the reference data;
// acc_en captures col_sum. Timing: col_sum holds the window present in
// the cycle acc_en was high, from the next cycle on.
module pe_array
  import me_pkg::*;
#(
  parameter int N = 16,
  localparam int NN    = N * N,
  localparam int IDX_W = $clog2(NN),
  localparam int COL_W = PIX_W + $clog2(N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cmb_we,
  input  logic [IDX_W-1:0] cmb_idx,
  input  pix_t             cmb_pix,
  input  logic [NN-1:0]    csm,
  input  logic             shift,
  input  pix_t             bot_in  [N],
  output pix_t             top_out [N],
  input  logic             acc_en,
  output logic [COL_W-1:0] col_sum [N]
);
  pix_t             ref_q [N][N];       // [x][y]

  for (genvar x = 0; x < N; x++) begin : g_col
    for (genvar y = 0; y < N; y++) begin : g_row
      pix_t             rin;
      logic [COL_W-1:0] pin, pout;
      if (y == 0) begin : g_first
        assign pin = '0;
      end else begin : g_next
        assign pin = g_row[y-1].pout;
      end
      if (y == N - 1) begin : g_bot
        assign rin = bot_in[x];
      end else begin : g_mid
        assign rin = ref_q[x][y+1];
      end
      pe #(.COL_W(COL_W)) u_pe (
        .clk, .rst_n,
        .cmb_we  (cmb_we && (cmb_idx == IDX_W'(y * N + x))),
        .cmb_pix (cmb_pix),
        .csm     (csm[y*N+x]),
        .shift   (shift),
        .ref_in  (rin),
        .ref_out (ref_q[x][y]),
        .psum_in (pin),
        .psum_out(pout)
      );
    end
    assign top_out[x] = ref_q[x][0];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      col_sum[x] <= '0;
      else if (acc_en) col_sum[x] <= g_row[N-1].pout;
    end
  end
endmodule
