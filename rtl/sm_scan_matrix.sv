// Scan Matrix: low-power scan architecture with R x C scan cells.
//
// The scan cells are arranged as R rows of C cells. Each row is a short scan
// path; a column ring selects which cell of every row is on, and a row ring
// selects which row takes the datum. Exactly one cell is written per shift
// cycle, into its pre-latch, so neither the other cells nor the circuit under
// test switch while a pattern is scanned in.
//
// How it works: start resets both rings (token on row 0 and column 0) and
// starts R*C shift cycles. The scan input si is fed to the start of every row.
// In shift cycle t the row ring points at row t mod R and the column ring at
// column t div R: that cell stores si and its row drives the cell's master
// value to so, which thus carries the previous responses out while the new
// pattern comes in. The row ring advances every shift cycle; the column ring
// advances whenever the row ring leaves its last row. After the shift cycles
// comes one update cycle (pre-latches to masters: the pattern is applied) and
// one capture cycle (the responses d into the masters). An inverter follows
// every INV_EVERY cells of a row, so cells in odd groups are of negative
// polarity; a row with an odd number of such inverters gets one more at its
// end, so that so always shows true values.
//
// Interface and timing: start is accepted while idle (ready high). shift is
// high in the shift cycles; si must then hold the datum of cell
// (t mod R, t div R) and so shows that cell's master value in the same cycle.
// update and capture are one cycle each, then done pulses with ready.
// Cell (r, c) is bit r*C + c of q (to the circuit under test) and of d
// (from it).
// From the document: the matrix organisation, the two rings, row-by-row token
// order within a column, the SMR cells, the update and capture cycles, an
// inverting buffer every four cells, and the 41 x 40 size given for s38417.
// This design's choices: the sequencing FSM, the AND-OR collection of row
// outputs and the broadcast scan input.
module sm_scan_matrix #(
  parameter int unsigned R         = 41,
  parameter int unsigned C         = 40,
  parameter int unsigned INV_EVERY = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           ready,
  input  logic           si,
  output logic           so,
  output logic           shift,
  output logic           update,
  output logic           capture,
  output logic           done,
  input  logic [R*C-1:0] d,
  output logic [R*C-1:0] q
);

  localparam int unsigned NCELL = R * C;
  localparam int unsigned CW    = $clog2(NCELL + 1);
  localparam int unsigned NINV  = (C - 1) / INV_EVERY;   // inverters inside a row
  localparam bit          ENDINV = NINV[0];

  typedef enum logic [1:0] {M_IDLE, M_SHIFT, M_UPDATE, M_CAPTURE} sm_state_e;

  sm_state_e     st;
  logic [CW-1:0] cnt;
  logic [R-1:0]  row_wl;
  logic [C-1:0]  col_wl;
  logic          row_last, col_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= M_IDLE;
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        M_IDLE:    if (start) begin st <= M_SHIFT; cnt <= '0; end
        M_SHIFT: begin
          cnt <= cnt + 1'b1;
          if (cnt == CW'(NCELL - 1)) st <= M_UPDATE;
        end
        M_UPDATE:  st <= M_CAPTURE;
        M_CAPTURE: begin st <= M_IDLE; done <= 1'b1; end
        default:   st <= M_IDLE;
      endcase
    end
  end

  assign ready   = (st == M_IDLE);
  assign shift   = (st == M_SHIFT);
  assign update  = (st == M_UPDATE);
  assign capture = (st == M_CAPTURE);

  sm_ring_generator #(.LEN(R)) u_rows (
    .clk, .rst_n, .init(ready && start), .adv(shift), .wl(row_wl), .last(row_last));

  sm_ring_generator #(.LEN(C)) u_cols (
    .clk, .rst_n, .init(ready && start), .adv(shift && row_last), .wl(col_wl), .last(col_last));

  // path[r][c] is the scan path value entering cell c of row r
  logic [C:0]   path [R];
  logic [R-1:0] row_so;

  for (genvar r = 0; r < int'(R); r++) begin : g_row
    assign path[r][0] = si;
    for (genvar c = 0; c < int'(C); c++) begin : g_cell
      logic cell_so;
      sm_smr #(.NEG(((c / INV_EVERY) % 2) == 1)) u_smr (
        .clk, .sel(col_wl[c]), .row(row_wl[r]), .shift, .update, .capture,
        .si(path[r][c]), .so(cell_so), .d(d[r*C + c]), .q(q[r*C + c]));
      if (c + 1 < int'(C) && ((c + 1) % INV_EVERY) == 0) begin : g_inv
        assign path[r][c+1] = ~cell_so;
      end else begin : g_wire
        assign path[r][c+1] = cell_so;
      end
    end
    assign row_so[r] = path[r][C] ^ ENDINV;
  end

  assign so = |(row_so & row_wl);

  initial assert (R >= 2 && C >= 2 && INV_EVERY >= 1)
    else $error("sm_scan_matrix: needs at least 2 rows, 2 columns and INV_EVERY >= 1");
  a_col_ring: assert property (@(posedge clk) disable iff (!rst_n)
    (shift && col_last && row_last) |=> !shift);

endmodule
