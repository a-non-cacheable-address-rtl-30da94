// cache_mem: storage of a direct-mapped cache: one valid bit, one tag and one
// block of WPL words per line.
//
// Reads are combinational: the addressed line's valid bit, tag and whole block
// appear at the outputs in the same cycle as rd_index. Writes happen on the
// rising clock edge: a word write with byte enables (used for block fill and
// for write hits), and a tag write that sets the line's tag and valid bit.
// Reset clears every valid bit. The 4-word block follows the scheme's cache;
// the line count, direct mapping and combinational read are this design's own
// choices.
module cache_mem #(
  parameter int unsigned LINES  = nc_pkg::LINES,
  parameter int unsigned WPL    = nc_pkg::WPL,
  parameter int unsigned TAG_W  = 21,
  parameter int unsigned DATA_W = nc_pkg::DATA_W,
  localparam int unsigned IDX_W = $clog2(LINES),
  localparam int unsigned WO_W  = $clog2(WPL),
  localparam int unsigned BE_W  = DATA_W / 8
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // lookup
  input  logic [IDX_W-1:0]             rd_index,
  output logic                         rd_valid,
  output logic [TAG_W-1:0]             rd_tag,
  output logic [WPL-1:0][DATA_W-1:0]   rd_block,
  // word write
  input  logic                         wr_en,
  input  logic [IDX_W-1:0]             wr_index,
  input  logic [WO_W-1:0]              wr_word,
  input  logic [BE_W-1:0]              wr_be,
  input  logic [DATA_W-1:0]            wr_data,
  // tag write (sets valid)
  input  logic                         tag_we,
  input  logic [IDX_W-1:0]             tag_index,
  input  logic [TAG_W-1:0]             tag_data
);

  logic [LINES-1:0]                   valid_q;
  logic [TAG_W-1:0]                   tag_q  [LINES];
  logic [WPL-1:0][DATA_W-1:0]         data_q [LINES];

  always_comb begin
    rd_valid = valid_q[rd_index];
    rd_tag   = tag_q[rd_index];
    rd_block = data_q[rd_index];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else if (tag_we) valid_q[tag_index] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (tag_we) tag_q[tag_index] <= tag_data;
    if (wr_en) begin
      for (int b = 0; b < BE_W; b++)
        if (wr_be[b]) data_q[wr_index][wr_word][8*b +: 8] <= wr_data[8*b +: 8];
    end
  end

endmodule
