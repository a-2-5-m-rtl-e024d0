// pixel_fd_model: behavioural model of the floating diffusions of the
// shared-pixel array, for testbenches only (the array itself is analog).
//
// Each shared row m has one floating diffusion (FD) and four photodiodes
// A, B (upper pixel row) and C, D (lower pixel row). The transfer lines
// are cross-connected between neighbouring shared rows, so that one line
// serves two rows:
//   TG_1/2(m) transfers C of row m and B of row m+1,
//   TG_0/3(m) transfers D of row m-1 and A of row m.
// This mapping follows from which photodiode each select pulse reads after
// which transfer pulse in the row timing pattern. The model tracks, per FD,
// "?" (unknown), "R" (reset, no charge) or the label of the one photodiode
// transferred since the reset ("C21" = photodiode C of row 21, rows counted
// from n); a second transfer without a reset gives "X".
module pixel_fd_model #(
  parameter int ROWS_N = 1124,
  parameter int BASE   = 20
);
  string fd [ROWS_N];

  function automatic void clear();
    foreach (fd[i]) fd[i] = "?";
  endfunction

  function automatic string sample(input int row);
    return fd[row];
  endfunction

  function automatic void put(input int row, input string pd);
    if (row < 0 || row >= ROWS_N) return;
    if (fd[row] == "R") fd[row] = $sformatf("%s%0d", pd, row - BASE);
    else                fd[row] = "X";
  endfunction

  // apply one slot's RST and TG lines; transfers count once per pulse
  function automatic void apply(input logic [ROWS_N-1:0] rst, input logic [ROWS_N-1:0] tg12,
                                input logic [ROWS_N-1:0] tg03, input bit first_slot_of_pulse);
    for (int m = 0; m < ROWS_N; m++) if (rst[m]) fd[m] = "R";
    if (!first_slot_of_pulse) return;
    for (int m = 0; m < ROWS_N; m++) begin
      if (tg12[m]) begin put(m, "C"); put(m + 1, "B"); end
      if (tg03[m]) begin put(m - 1, "D"); put(m, "A"); end
    end
  endfunction
endmodule
