// sorter_unit: parallel selection of the two highest-pT muon candidates.
//
// All N*(N-1)/2 pairwise comparisons are made at once (325 comparators for the
// 26 candidates of an octant). Comparator (i,j), i<j, is pT_i >= pT_j; the
// matrix entry (j,i) is its inverse, so equal pT values are resolved in favour
// of the lower candidate index. The highest candidate is the one that wins
// every comparison of its row. The second highest is found in a second matrix
// in which every comparison involving the highest candidate is inverted (the
// highest then loses against all others): the candidate winning its whole row
// there is the second. Both winners are one-hot vectors used to multiplex the
// sector number, RoI and pT of the chosen candidates.
//
// A candidate with pT = 0 is absent; an output whose pT is 0 is marked not
// valid. ncand reports zero, one, two or more than two candidates present.
// Candidate i belongs to sector i/2. The unit is purely combinational; the
// enclosing pipeline gives it (with the encoder) two 160 MHz cycles.
module sorter_unit
  import muctpi_pkg::*;
#(
  parameter int N = N_CAND
) (
  input  cand_t        cand [N],
  output sorted_cand_t first,
  output sorted_cand_t second,
  output ncand_e       ncand,
  output logic [N-1:0] win1,     // one-hot: highest candidate
  output logic [N-1:0] win2      // one-hot: second highest candidate
);

  // beats[i][j]: candidate i ranks above candidate j
  logic [N-1:0] beats [N];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        if (i < j)      beats[i][j] = (cand[i].pt >= cand[j].pt);
        else if (i > j) beats[i][j] = !(cand[j].pt >= cand[i].pt);
        else            beats[i][j] = 1'b1;
      end
    end
  end

  always_comb begin
    // first matrix: row of all ones
    for (int i = 0; i < N; i++) win1[i] = &beats[i];
    // second matrix: comparisons against the highest candidate inverted
    for (int i = 0; i < N; i++) begin
      logic row;
      row = !win1[i];
      for (int j = 0; j < N; j++)
        if (j != i) row = row & (win1[j] | beats[i][j]);
      win2[i] = row;
    end
  end

  function automatic sorted_cand_t pick(input logic [N-1:0] onehot, input cand_t c [N]);
    sorted_cand_t r;
    r = '0;
    for (int i = 0; i < N; i++) begin
      if (onehot[i]) begin
        r.sector = SECT_W'(i / 2);
        r.roi    = c[i].roi;
        r.pt     = c[i].pt;
      end
    end
    r.valid = (r.pt != '0);
    return r;
  endfunction

  always_comb begin
    int n;
    first  = pick(win1, cand);
    second = pick(win2, cand);
    n = 0;
    for (int i = 0; i < N; i++) n += (cand[i].pt != '0) ? 1 : 0;
    ncand = (n >= 3) ? NCAND_MORE : ncand_e'(n);
  end

  always_comb begin
    assert final ($onehot(win1)) else $error("sorter_unit: highest candidate not unique");
    assert final ($onehot(win2)) else $error("sorter_unit: second candidate not unique");
  end

endmodule
