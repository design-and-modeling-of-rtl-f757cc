// sort_mchws: pipelined sorting unit built as a homogeneous wave (conveyor)
// structure of comparison-switching layers.
//
// The N input samples enter layer 0; each of the N layers is a row of
// cmp_swap cells on neighbouring lanes, pairing lanes (0,1),(2,3),... on even
// layers and (1,2),(3,4),... on odd layers (odd-even transposition). After N
// such layers any input vector is in order, so y[0] is the minimum (rank 0)
// and y[N-1] the maximum (rank N-1). Every layer ends in a register, so a new
// vector can enter each clock (one window per clock) and leaves N clocks
// later; in_valid travels alongside as out_valid. Clock enable is not needed:
// idle slots simply travel through as invalid.
//
// The original description names the structure (layers of digital comparison
// switching circuits, pipelined, homogeneous); the odd-even transposition
// pairing and a register after every layer are this design's reading of it.
module sort_mchws #(
  parameter int unsigned N = 9,
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] x [N],
  output logic         out_valid,
  output logic [W-1:0] y [N]      // ascending: y[0] = min, y[N-1] = max
);
  // stage[k] holds the register output of layer k-1; stage[0] is the input.
  logic [W-1:0] stage [N+1][N];
  logic [N:0]   vld;

  assign stage[0] = x;
  assign vld[0]   = in_valid;

  for (genvar k = 0; k < N; k++) begin : g_layer
    logic [W-1:0] nxt [N];
    logic [W-1:0] q   [N];
    logic         q_vld;

    for (genvar i = 0; i < N; i++) begin : g_lane
      if ((i % 2) == (k % 2) && i + 1 < N) begin : g_cell
        cmp_swap #(.W(W)) u_cs (
          .a (stage[k][i]),
          .b (stage[k][i+1]),
          .lo(nxt[i]),
          .hi(nxt[i+1])
        );
      end else if (!((i % 2) != (k % 2) && i > 0)) begin : g_pass
        // lane not touched by a cell in this layer
        assign nxt[i] = stage[k][i];
      end
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        q     <= '{default: '0};
        q_vld <= 1'b0;
      end else begin
        q     <= nxt;
        q_vld <= vld[k];
      end
    end

    assign stage[k+1] = q;
    assign vld[k+1]   = q_vld;
  end

  assign y         = stage[N];
  assign out_valid = vld[N];
endmodule
