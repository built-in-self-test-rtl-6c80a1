// Balanced tree of 2-input AND gates (IS_OR=0) or OR gates (IS_OR=1), the
// space compactor of the ILV BIST. Level 0 holds the N_IN inputs; every
// further level combines neighbouring pairs of the level below (2j, 2j+1)
// in one gate and passes an unpaired last node straight up, so each input
// sees at most DEPTH = ceil(log2(N_IN)) gate levels: the "optimally
// balanced" tree of the method. The pairing order is this design's way of
// building it.
//
// Interface: d[N_IN] in, y out. Purely combinational.
module bist_reduce_tree #(
  parameter int unsigned N_IN  = 31,
  parameter bit          IS_OR = 1'b0
) (
  input  logic [N_IN-1:0] d,
  output logic            y
);

  localparam int unsigned DEPTH = (N_IN <= 1) ? 0 : $clog2(N_IN);

  // Number of nodes on level k.
  function automatic int unsigned width_of(int unsigned k);
    int unsigned w = N_IN;
    for (int unsigned i = 0; i < k; i++) w = (w + 1) / 2;
    return w;
  endfunction

  logic [N_IN-1:0] lvl [DEPTH+1];

  assign lvl[0] = d;

  for (genvar k = 1; k <= DEPTH; k++) begin : g_level
    localparam int unsigned WB = width_of(k - 1);  // nodes below
    localparam int unsigned W  = width_of(k);      // nodes on this level
    for (genvar j = 0; j < N_IN; j++) begin : g_node
      if (j >= W) begin : g_none
        assign lvl[k][j] = 1'b0;
      end else if (2 * j + 1 >= WB) begin : g_pass
        assign lvl[k][j] = lvl[k-1][2*j];
      end else if (IS_OR) begin : g_or
        assign lvl[k][j] = lvl[k-1][2*j] | lvl[k-1][2*j+1];
      end else begin : g_and
        assign lvl[k][j] = lvl[k-1][2*j] & lvl[k-1][2*j+1];
      end
    end
  end

  assign y = lvl[DEPTH][0];

endmodule
