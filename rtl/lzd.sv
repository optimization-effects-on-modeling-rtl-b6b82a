// lzd: hierarchical leading-one detector, N a power of two (N >= 2).
//
// Input index 0 is the MSB. Output pos is the index of the first 1 (which is
// also the number of zeros before it) and valid says that there is one.
// Level 1 is a row of 2-bit cells: pos = NOT b[0], valid = b[0] OR b[1]
// (pattern 1x -> 0, 01 -> 1, 00 -> not valid). Each further level combines
// neighbouring nodes (left = more significant) of the level below:
//   valid = v_left OR v_right
//   pos   = {NOT v_left, v_left ? pos_left : pos_right}
// so a node's position grows by one bit per level and the tree has log2(N)
// levels of a 2:1 multiplexer each. The cell and the combining rule are the
// published ones (after Oklobdzija). The input is declared with an
// ascending range on purpose, so that b[0] is the MSB as in the published
// numbering; lint tools note the ascending range. Purely combinational.
module lzd #(
  parameter int unsigned N = 128
) (
  input  logic [0:N-1]         b,
  output logic [$clog2(N)-1:0] pos,
  output logic                 valid
);
  localparam int unsigned LV = $clog2(N);

  // level l has N >> l nodes; node j covers input bits j*2^l .. (j+1)*2^l - 1
  // and has an l-bit position
  for (genvar l = 1; l <= LV; l++) begin : g_level
    logic [l-1:0] p [N >> l];
    logic         v [N >> l];
    if (l == 1) begin : g_cells
      for (genvar j = 0; j < N / 2; j++) begin : g_cell
        assign p[j] = ~b[2*j];
        assign v[j] = b[2*j] | b[2*j+1];
      end
    end else begin : g_nodes
      for (genvar j = 0; j < (N >> l); j++) begin : g_node
        logic vl;
        assign vl   = g_level[l-1].v[2*j];
        assign v[j] = vl | g_level[l-1].v[2*j+1];
        assign p[j] = {~vl, (vl ? g_level[l-1].p[2*j] : g_level[l-1].p[2*j+1])};
      end
    end
  end

  assign pos   = g_level[LV].p[0];
  assign valid = g_level[LV].v[0];
endmodule
