// survival_array: a self-repairing array of reconfigurable cells.
//
// Cells sit on a COLS x ROWS grid in a fixed checkerboard. With 0-based
// column i and row j (row 0 at the bottom):
//   i even, j even : spare cell (SC)
//   i odd,  j odd  : routing cell (RC)
//   otherwise      : working cell (FC)
// so every FC has two SCs and two RCs as its orthogonal neighbours, and every
// SC and RC has four FCs. FCs in even columns have their SCs north and south,
// FCs in odd columns have them east and west.
//
// Operation:
//   1. Download (repair_en = 0): the host writes each cell's genes through
//      cfg_we / cfg_col / cfg_row / cfg_data. FCs and SCs take 16 flags, RCs
//      the low 8 (their routes, normally all 0 = direct).
//   2. Run (repair_en = 1): each FC computes on slot_in of its grid place and
//      checks every result on line. A wrong result makes it send wrong
//      survival codes; a neighbouring spare copies its genes and takes over its
//      input (two clock edges), and the RC on the FC's east side (FC in an even
//      column) or north side (odd column) switches the FC's slot_out to that
//      spare on the next edge. No test mode is needed and the rest of the array
//      keeps working.
//   sys_fault flags an FC that is faulty and not yet rerouted, which is the
//   case that has to be handled above the array.
//
// Ports are grid-shaped arrays indexed [row][column]. slot_in and slot_out are
// only meaningful at FC places; fault_inj inverts the function output of any
// cell and exists to model defects in test.
//
// The grid, the cell kinds and their neighbourhood are the document's (6 x 6
// by default); grid indexing, the host port and which RC drives each FC's
// result are this design's choice. COLS and ROWS must be even.
module survival_array
  import survival_pkg::*;
#(
  parameter int unsigned COLS = 6,
  parameter int unsigned ROWS = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              repair_en,
  input  logic              cfg_we,
  input  logic [7:0]        cfg_col,
  input  logic [7:0]        cfg_row,
  input  logic [GENE_W-1:0] cfg_data,
  input  logic [1:0]        slot_in   [ROWS][COLS],
  input  logic              fault_inj [ROWS][COLS],
  output logic              slot_out  [ROWS][COLS],
  output logic              cell_ok   [ROWS][COLS],
  output logic [3:0]        sc_taken  [ROWS][COLS],
  output logic [ROUTE_W-1:0] rc_route [ROWS][COLS],
  output logic              nbr_alarm [ROWS][COLS],
  output logic              sys_fault
);

  // Per-place signals (unused ones stay at their idle value)
  logic [7:0]        tx      [ROWS][COLS];
  logic [GENE_W-1:0] gene    [ROWS][COLS];
  logic              pout    [ROWS][COLS];
  logic [3:0]        pclaim  [ROWS][COLS];
  logic [3:0]        taken   [ROWS][COLS];
  logic [3:0]        rc_out  [ROWS][COLS];
  logic [3:0]        rc_unrep[ROWS][COLS];

  function automatic bit is_sc(int i, int j);
    return (i % 2 == 0) && (j % 2 == 0);
  endfunction
  function automatic bit is_rc(int i, int j);
    return (i % 2 == 1) && (j % 2 == 1);
  endfunction
  function automatic bit inside_grid(int i, int j);
    return (i >= 0) && (i < int'(COLS)) && (j >= 0) && (j < int'(ROWS));
  endfunction

  initial begin
    assert (COLS % 2 == 0 && ROWS % 2 == 0 && COLS >= 2 && ROWS >= 2)
      else $error("survival_array: COLS and ROWS must be even and at least 2");
  end

  for (genvar j = 0; j < ROWS; j++) begin : g_row
    for (genvar i = 0; i < COLS; i++) begin : g_col
      logic sel;
      assign sel = cfg_we && (cfg_col == 8'(i)) && (cfg_row == 8'(j));

      if (is_rc(i, j)) begin : g_rc
        logic [7:0] rx;
        logic [3:0] fco;
        logic [3:0] sco;
        logic [3:0] sct [4];
        logic [3:0] flt;
        // FC neighbours N, S, E, W; SC diagonals NE, NW, SE, SW
        localparam int NI [4] = '{i, i, i + 1, i - 1};
        localparam int NJ [4] = '{j + 1, j - 1, j, j};
        localparam int DI [4] = '{i + 1, i - 1, i + 1, i - 1};
        localparam int DJ [4] = '{j + 1, j + 1, j - 1, j - 1};
        for (genvar d = 0; d < 4; d++) begin : g_n
          if (inside_grid(NI[d], NJ[d])) begin : g_in
            assign rx[7-2*d -: 2] = code_field(tx[NJ[d]][NI[d]], opposite(dir_e'(d)));
            assign fco[d]         = pout[NJ[d]][NI[d]];
          end else begin : g_out
            assign rx[7-2*d -: 2] = code_field(CODE_RECV, dir_e'(d));
            assign fco[d]         = 1'b0;
          end
          if (inside_grid(DI[d], DJ[d])) begin : g_din
            assign sco[d] = pout[DJ[d]][DI[d]];
            assign sct[d] = taken[DJ[d]][DI[d]];
          end else begin : g_dout
            assign sco[d] = 1'b0;
            assign sct[d] = '0;
          end
        end

        routing_cell u_rc (
          .clk, .rst_n,
          .cfg_we(sel), .cfg_data(cfg_data[ROUTE_W-1:0]),
          .repair_en,
          .rx_code(rx),
          .fc_out(fco),
          .sc_res(sco),
          .sc_taken(sct),
          .routed_out(rc_out[j][i]),
          .fault(flt),
          .unrepaired(rc_unrep[j][i]),
          .route_q(rc_route[j][i])
        );

        assign tx[j][i]     = CODE_SEND;
        assign gene[j][i]   = '0;
        assign pout[j][i]   = 1'b0;
        assign pclaim[j][i] = '0;
        assign taken[j][i]  = '0;
        assign cell_ok[j][i]  = ~|flt;
        assign nbr_alarm[j][i] = |flt;
        assign sc_taken[j][i] = '0;
        assign slot_out[j][i] = 1'b0;
      end else begin : g_cell
        logic [7:0]        rx;
        logic [1:0]        npin  [4];
        logic [GENE_W-1:0] ngene [4];
        logic [3:0]        peer;
        localparam int NI [4] = '{i, i, i + 1, i - 1};
        localparam int NJ [4] = '{j + 1, j - 1, j, j};
        for (genvar d = 0; d < 4; d++) begin : g_n
          if (inside_grid(NI[d], NJ[d])) begin : g_in
            assign rx[7-2*d -: 2] = code_field(tx[NJ[d]][NI[d]], opposite(dir_e'(d)));
            assign npin[d]        = slot_in[NJ[d]][NI[d]];
            assign ngene[d]       = gene[NJ[d]][NI[d]];
          end else begin : g_out
            assign rx[7-2*d -: 2] = code_field(CODE_RECV, dir_e'(d));
            assign npin[d]        = '0;
            assign ngene[d]       = '0;
          end
        end

        // The far-side SC of the FC to the north (i, j+2) and to the east (i+2, j)
        if (is_sc(i, j) && inside_grid(i, j + 2)) begin : g_pn
          assign peer[DIR_N] = pclaim[j+2][i][DIR_S] | taken[j+2][i][DIR_S];
        end else begin : g_npn
          assign peer[DIR_N] = 1'b0;
        end
        if (is_sc(i, j) && inside_grid(i + 2, j)) begin : g_pe
          assign peer[DIR_E] = pclaim[j][i+2][DIR_W] | taken[j][i+2][DIR_W];
        end else begin : g_npe
          assign peer[DIR_E] = 1'b0;
        end
        assign peer[DIR_S] = 1'b0;
        assign peer[DIR_W] = 1'b0;

        basic_cell u_cell (
          .clk, .rst_n, .repair_en,
          .cfg_we(sel), .cfg_gene(cfg_data),
          .pin(is_sc(i, j) ? 2'b00 : slot_in[j][i]),
          .nbr_pin(npin),
          .pout(pout[j][i]),
          .fault_inj(fault_inj[j][i]),
          .tx_code(tx[j][i]),
          .rx_code(rx),
          .gene_out(gene[j][i]),
          .nbr_gene(ngene),
          .peer_claim(peer),
          .primary_claim(pclaim[j][i]),
          .taken(taken[j][i]),
          .cell_ok(cell_ok[j][i]),
          .nbr_fault(),
          .nbr_alarm(nbr_alarm[j][i])
        );

        assign rc_out[j][i]   = '0;
        assign rc_unrep[j][i] = '0;
        assign rc_route[j][i] = '0;
        assign sc_taken[j][i] = is_sc(i, j) ? taken[j][i] : 4'b0000;

        // FC result through its RC: east RC for even columns, north RC for odd
        if (is_sc(i, j)) begin : g_sc_out
          assign slot_out[j][i] = 1'b0;
        end else if (i % 2 == 0) begin : g_fc_e
          if (i + 1 < COLS) begin : g_has
            assign slot_out[j][i] = rc_out[j][i+1][DIR_W];
          end else begin : g_none
            assign slot_out[j][i] = pout[j][i];
          end
        end else begin : g_fc_n
          if (j + 1 < ROWS) begin : g_has
            assign slot_out[j][i] = rc_out[j+1][i][DIR_S];
          end else begin : g_none
            assign slot_out[j][i] = pout[j][i];
          end
        end
      end
    end
  end

  // An FC that is faulty and not rerouted by any of its RCs
  always_comb begin
    sys_fault = 1'b0;
    for (int j = 0; j < int'(ROWS); j++)
      for (int i = 0; i < int'(COLS); i++)
        if (is_rc(i, j)) sys_fault |= |rc_unrep[j][i];
  end

endmodule
