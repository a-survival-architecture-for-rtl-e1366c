// survival_pkg: types and constants shared by the cells of the survival array.
//
// Directions are numbered N=0, S=1, E=2, W=3. An 8-bit code word carries one
// 2-bit code per direction, N in bits [7:6], S in [5:4], E in [3:2], W in [1:0].
//
// Survival codes. A healthy cell sends 11 to the north, 00 to the south, 10 to
// the east and 01 to the west. A neighbour receives each code on its opposite
// side, so every healthy receiver sees the 8-bit chain 00110110 on its N, S, E,
// W inputs. Both code sets are the document's; the per-port ordering of the
// chain is how the two statements fit together.
//
// Gene word (16 flags, R0000..R1111, bit i is register Ri in binary):
//   [3:0]   good results of the cell's function for inputs 00..11
//   [13:4]  one-hot function flags (AND, OR, NAND, NOR named by the document;
//           ADD, SUB and INV named as possible members; the rest assumed)
//   [14]    life flag (1: cell usable)
//   [15]    role flag (1: working FC, 0: spare SC); the value encoding is assumed
package survival_pkg;

  typedef enum logic [1:0] {DIR_N = 2'd0, DIR_S = 2'd1, DIR_E = 2'd2, DIR_W = 2'd3} dir_e;

  localparam int unsigned GENE_W   = 16;
  localparam int unsigned ROUTE_W  = 8;   // RC memory: half of the FC's
  localparam int unsigned NUM_FUNC = 10;  // flags R0100..R1101

  // Gene bit positions
  localparam int unsigned G_GOOD_LSB = 0;
  localparam int unsigned G_FUNC_LSB = 4;
  localparam int unsigned G_LIFE     = 14;
  localparam int unsigned G_ROLE     = 15;

  // Function flag indices within the 10 function flags (flag k is gene bit 4+k)
  localparam int unsigned F_AND  = 0;  // R0100
  localparam int unsigned F_OR   = 1;  // R0101
  localparam int unsigned F_NAND = 2;  // R0110
  localparam int unsigned F_NOR  = 3;  // R0111
  localparam int unsigned F_XOR  = 4;  // R1000  sum/difference bit
  localparam int unsigned F_XNOR = 5;  // R1001
  localparam int unsigned F_ADD  = 6;  // R1010  carry of in[1] + in[0]
  localparam int unsigned F_SUB  = 7;  // R1011  borrow of in[1] - in[0]
  localparam int unsigned F_INV  = 8;  // R1100  ~in[0]
  localparam int unsigned F_BUF  = 9;  // R1101  in[0]

  // Code a healthy cell sends, in NSEW order
  localparam logic [7:0] CODE_SEND = 8'b11_00_10_01;
  // Chain a healthy neighbourhood presents at a receiver's N, S, E, W inputs
  localparam logic [7:0] CODE_RECV = 8'b00_11_01_10;

  // Field of direction d within an 8-bit NSEW code word
  function automatic logic [1:0] code_field(logic [7:0] w, dir_e d);
    return w[7 - 2*int'(d) -: 2];
  endfunction

  function automatic dir_e opposite(dir_e d);
    case (d)
      DIR_N:   return DIR_S;
      DIR_S:   return DIR_N;
      DIR_E:   return DIR_W;
      default: return DIR_E;
    endcase
  endfunction

  // Routing state of one RC port (2 bits per FC neighbour)
  typedef enum logic [1:0] {
    RT_DIRECT = 2'b00,  // FC drives the port
    RT_CAND0  = 2'b01,  // first candidate SC replaced the FC
    RT_CAND1  = 2'b10,  // second candidate SC replaced the FC
    RT_OFF    = 2'b11   // port disabled, drives 0
  } route_e;

endpackage
