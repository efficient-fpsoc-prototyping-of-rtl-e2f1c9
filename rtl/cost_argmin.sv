// cost_argmin: combinational comparator of the parallel search. It scans
// N costs and returns the index and value of the smallest; on equal costs
// the lower index wins (strict less-than), so of the two zero-voltage states
// 000 is preferred over 111 unless the switching term favours 111.
// Following the document: one combinational comparator over the eight
// costs. This design's own choice: the tie rule and a linear chain of
// compares (a tree gives the same result).
module cost_argmin
  import mpc_pkg::*;
#(
  parameter int unsigned N = NSW
) (
  input  cost_t                  costs [N],
  output logic [$clog2(N)-1:0]   idx,
  output cost_t                  min_cost
);

  always_comb begin
    idx      = '0;
    min_cost = costs[0];
    for (int i = 1; i < N; i++) begin
      if (costs[i] < min_cost) begin
        min_cost = costs[i];
        idx      = ($clog2(N))'(i);
      end
    end
  end

endmodule
