// Best-two selector used by the TSM sorting stages.
//
// Given N candidates, each with a 4-bit rank and an enable, the module finds
// the candidate with the highest rank (first) and the best of the rest
// (second). Equal ranks are resolved in favour of the lower index, so the
// result is deterministic. Disabled candidates never win. The selector is
// purely combinational; the chips that use it register its result.
//
// The TSMS uses it over the seven Preselect Words to choose the two tracks of
// a bunch crossing; a TSMD in back-up processing uses only its first output to
// choose the best track of its half chamber. The ranking rule itself is this
// design's choice: the published description states only that the Selection
// chip sorts, and that its algorithm is tuned through registers.
module tsm_sorter
  import tsm_pkg::*;
#(
  parameter int unsigned N  = 7,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  rank_t   rank  [N],
  input  logic    en    [N],
  output logic          first_vld,
  output logic [IW-1:0] first_idx,
  output logic          second_vld,
  output logic [IW-1:0] second_idx
);

  always_comb begin
    rank_t best;
    first_vld = 1'b0;
    first_idx = '0;
    best      = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (en[i] && (!first_vld || rank[i] > best)) begin
        first_vld = 1'b1;
        first_idx = IW'(i);
        best      = rank[i];
      end
    end
  end

  always_comb begin
    rank_t best;
    second_vld = 1'b0;
    second_idx = '0;
    best       = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (en[i] && !(first_vld && first_idx == IW'(i)) &&
          (!second_vld || rank[i] > best)) begin
        second_vld = 1'b1;
        second_idx = IW'(i);
        best       = rank[i];
      end
    end
  end

endmodule
