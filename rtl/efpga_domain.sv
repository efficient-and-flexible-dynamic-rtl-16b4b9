// One reconfiguration domain of the e-FPGA: ROWS x COLS tiles on a single
// W-bit configuration path.
//
// The configuration path enters at tile (0,0), runs along each row and on
// to the next row (tile index r*COLS + c), and leaves at the last tile, so a
// domain context is ROWS*COLS*TILE_BITS/W words, the first word shifted in
// ending in the top bits of the last tile. All tiles share conf_en, ff_init
// and the RAM-mode write strobe; busy is the OR of the tiles' busy.
//
// Computing path: each tile sees the route outputs of its four neighbours;
// at the domain edge those come from the *_in ports and the edge tiles'
// route outputs leave on the *_out ports, so domains tile into a larger
// array. The carry chain runs west to east along each row.
//
// Default size: 20 x 31 = 620 logic cells, the published domain size; the
// aspect ratio is this design's choice.
module efpga_domain
  import duck_pkg::*;
#(
  parameter int unsigned ROWS = 20,
  parameter int unsigned COLS = 31,
  parameter int unsigned W    = CFG_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              shift_en,
  input  logic [W-1:0]      scan_in,
  output logic [W-1:0]      scan_out,
  input  logic              conf_en,
  output logic              busy,
  input  logic              ff_init,
  input  logic              ram_we,
  input  logic              ram_din,
  input  logic [ROWS-1:0]   west_in,
  input  logic [ROWS-1:0]   east_in,
  input  logic [COLS-1:0]   north_in,
  input  logic [COLS-1:0]   south_in,
  output logic [ROWS-1:0]   west_out,
  output logic [ROWS-1:0]   east_out,
  output logic [COLS-1:0]   north_out,
  output logic [COLS-1:0]   south_out,
  input  logic [ROWS-1:0]   carry_in,
  output logic [ROWS-1:0]   carry_out
);

  localparam int unsigned T = ROWS * COLS;

  logic [T:0][W-1:0]               chain;
  logic [T-1:0]                    tbusy;
  logic [ROWS-1:0][COLS-1:0]       rt;      // route outputs
  logic [ROWS-1:0][COLS-1:0]       co;      // carry outputs

  assign chain[0] = scan_in;
  assign scan_out = chain[T];
  assign busy     = |tbusy;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned IDX = r * COLS + c;
      logic [3:0] nbr;
      logic       cin;
      assign nbr[0] = (c == 0)        ? west_in[r]  : rt[r][c-1];
      assign nbr[1] = (r == 0)        ? north_in[c] : rt[r-1][c];
      assign nbr[2] = (c == COLS - 1) ? east_in[r]  : rt[r][c+1];
      assign nbr[3] = (r == ROWS - 1) ? south_in[c] : rt[r+1][c];
      assign cin    = (c == 0)        ? carry_in[r] : co[r][c-1];

      efpga_tile #(.W(W)) u_tile (
        .clk, .rst_n,
        .shift_en, .scan_in(chain[IDX]), .scan_out(chain[IDX+1]),
        .conf_en, .busy(tbusy[IDX]), .ff_init,
        .ram_we, .ram_din,
        .nbr_in(nbr), .route_out(rt[r][c]),
        .carry_in(cin), .carry_out(co[r][c])
      );
    end
    assign west_out[r]  = rt[r][0];
    assign east_out[r]  = rt[r][COLS-1];
    assign carry_out[r] = co[r][COLS-1];
  end

  for (genvar c = 0; c < COLS; c++) begin : g_edge
    assign north_out[c] = rt[0][c];
    assign south_out[c] = rt[ROWS-1][c];
  end

endmodule
