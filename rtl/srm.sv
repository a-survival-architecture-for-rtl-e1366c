// srm: self-repairing module of a cell.
//
// Only a spare cell (SC) uses it. It watches the survival codes of its four
// neighbours, which are all working cells (FC), and when one of them reports a
// fault it takes that cell's place by copying its genes.
//
//   8-bit parallel comparator: the received NSEW codes are compared with the
//     healthy chain 00110110; each 2-bit field gives one fault bit, and their OR
//     is the module's 1-bit primary output (0 in normal operation).
//   analyzer: picks the faulty neighbour to repair. Of the two SCs next to an
//     FC, the one to the north has priority (document); for an FC between two
//     SCs on the east and west, this design gives the east one priority. So an
//     SC repairs its south or west neighbour on its own authority (primary),
//     and its north or east neighbour only if the SC on that FC's far side has
//     not claimed it (secondary). When several neighbours fail together the
//     order is S, W, N, E.
//   downloading controller: IDLE -> COPY -> ACTIVE. In COPY the chosen
//     neighbour's gene word is written into the cell's registers, with the
//     life flag set and the role flag set to FC, so the repaired SC stops
//     acting on survival codes. ACTIVE holds the choice until reset.
//
// Timing: primary_claim is combinational from the codes, so the two SCs of one
// FC resolve the priority in the same cycle. The fault is registered one clock
// edge after it shows, the genes are written on the next edge, and the SC
// computes the FC's function from then on: two cycles from fault to repair.
// taken (one-hot, registered) tells the peer SC and the routing cells which FC
// this SC has replaced.
module srm
  import survival_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              repair_en,            // 0 during the initial download
  input  logic              spare,                // SC role, alive and self-check ok
  input  logic [7:0]        rx_code,              // codes received on N, S, E, W
  input  logic [3:0]        peer_claim,           // [N],[E]: far-side SC has the FC
  input  logic [GENE_W-1:0] nbr_gene [4],         // genes of the N, S, E, W cells
  output logic [3:0]        fault,                // comparator results per direction
  output logic              any_fault,            // primary 1-bit output
  output logic [3:0]        primary_claim,        // one-hot, combinational
  output logic [3:0]        taken,                // one-hot, registered
  output logic              active,               // this SC replaces a cell
  output dir_e              taken_dir,
  output logic              rep_we,
  output logic [GENE_W-1:0] rep_data
);

  typedef enum logic [1:0] {ST_IDLE, ST_COPY, ST_ACTIVE} state_e;
  state_e state;

  logic       can_act;
  logic       choose;
  dir_e       choice;

  // 8-bit parallel comparator
  always_comb begin
    for (int d = 0; d < 4; d++)
      fault[d] = (code_field(rx_code, dir_e'(d)) != code_field(CODE_RECV, dir_e'(d)));
  end
  assign any_fault = |fault;

  // Analyzer
  assign can_act = repair_en && spare && (state == ST_IDLE);

  always_comb begin
    primary_claim = '0;
    if (can_act) begin
      if (fault[DIR_S])      primary_claim[DIR_S] = 1'b1;
      else if (fault[DIR_W]) primary_claim[DIR_W] = 1'b1;
    end
  end

  always_comb begin
    choose = 1'b0;
    choice = DIR_S;
    if (can_act) begin
      if (fault[DIR_S]) begin
        choose = 1'b1; choice = DIR_S;
      end else if (fault[DIR_W]) begin
        choose = 1'b1; choice = DIR_W;
      end else if (fault[DIR_N] && !peer_claim[DIR_N]) begin
        choose = 1'b1; choice = DIR_N;
      end else if (fault[DIR_E] && !peer_claim[DIR_E]) begin
        choose = 1'b1; choice = DIR_E;
      end
    end
  end

  // Downloading controller
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_IDLE;
      taken_dir <= DIR_N;
    end else begin
      case (state)
        ST_IDLE:   if (choose) begin
                     state     <= ST_COPY;
                     taken_dir <= choice;
                   end
        ST_COPY:   state <= ST_ACTIVE;
        default:   state <= ST_ACTIVE;
      endcase
    end
  end

  assign active = (state != ST_IDLE);
  assign rep_we = (state == ST_COPY);

  always_comb begin
    rep_data           = nbr_gene[taken_dir];
    rep_data[G_LIFE]   = 1'b1;
    rep_data[G_ROLE]   = 1'b1;
  end

  always_comb begin
    taken = '0;
    if (active) taken[taken_dir] = 1'b1;
  end

  // Handshake rules between the two SCs of one FC and the controller
  a_claim_onehot: assert property (@(posedge clk) $onehot0(primary_claim));
  a_taken_onehot: assert property (@(posedge clk) $onehot0(taken));
  a_no_double:    assert property (@(posedge clk)
                                   !(choose && choice == DIR_N && peer_claim[DIR_N]));

endmodule
