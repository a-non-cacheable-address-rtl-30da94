// cache_ctrl: cache controller with non-cacheable masking, holding the cache
// storage (cache_mem) it controls.
//
// Every access arrives already decoded: nc is the non-cacheable indicator taken
// from the address MSB, addr the physical address with that bit cleared.
//   * nc = 1 (mirroring area): the cache is masked. Nothing is looked up,
//     filled or updated, even when the block is resident; the access goes to
//     the memory controller as a single word and the memory's data goes back to
//     the CPU. A stale copy left in the cache by an earlier cacheable access is
//     neither read nor changed.
//   * nc = 0, read hit: data comes from the cache in the same cycle.
//   * nc = 0, read miss: the whole 4-word block is filled from memory, the tag
//     is set, and the access is looked up again and hits one cycle later.
//   * nc = 0, write: written through to memory; a resident block is updated
//     in place (byte enables honoured), a missing one is not allocated.
// The masking rule and the read-miss fill follow the scheme. Direct mapping,
// write-through without allocation and the one-cycle re-lookup after a fill are
// this design's own choices: the scheme leaves the write policy open.
//
// CPU side: cpu_req with cpu_we/nc/addr/cpu_wdata/cpu_be is held until the
// cycle cpu_ack is high; read data is valid with cpu_ack. A read hit is
// acknowledged in the cycle it is presented. A single access (masked, or any
// write) is acknowledged with the memory controller's done, one cycle after
// the bus transfer could start; a read miss ends its fill with done and is
// acknowledged by the re-lookup one cycle later. ev_hit pulses for every
// cacheable read served from the cache (the re-lookup after a fill included),
// ev_miss once per block fill and ev_bypass once per masked access.
// The assertions use rst_n synchronously (disable iff) while the state
// register resets asynchronously; lint notes the mix, which is intended.
module cache_ctrl #(
  parameter int unsigned ADDR_W = nc_pkg::ADDR_W,
  parameter int unsigned DATA_W = nc_pkg::DATA_W,
  parameter int unsigned WPL    = nc_pkg::WPL,
  parameter int unsigned LINES  = nc_pkg::LINES,
  localparam int unsigned BE_W  = DATA_W / 8,
  localparam int unsigned BO_W  = $clog2(BE_W),
  localparam int unsigned WO_W  = $clog2(WPL),
  localparam int unsigned IDX_W = $clog2(LINES),
  localparam int unsigned TAG_LSB = IDX_W + WO_W + BO_W,
  // the indicator bit is not part of the tag: it is always 0 here
  localparam int unsigned TAG_W = ADDR_W - 1 - TAG_LSB
) (
  input  logic              clk,
  input  logic              rst_n,
  // decoded CPU access
  input  logic              cpu_req,
  input  logic              cpu_we,
  input  logic              nc,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] cpu_wdata,
  input  logic [BE_W-1:0]   cpu_be,
  output logic              cpu_ack,
  output logic [DATA_W-1:0] cpu_rdata,
  // to the memory controller
  output logic              mc_req,
  output logic              mc_we,
  output logic              mc_burst,
  output logic [ADDR_W-1:0] mc_addr,
  output logic [DATA_W-1:0] mc_wdata,
  output logic [BE_W-1:0]   mc_be,
  input  logic              mc_beat_valid,
  input  logic [WO_W-1:0]   mc_beat_idx,
  input  logic [DATA_W-1:0] mc_rdata,
  input  logic              mc_done,
  // event pulses
  output logic              ev_hit,
  output logic              ev_miss,
  output logic              ev_bypass
);

  typedef enum logic [1:0] {S_IDLE, S_SINGLE, S_FILL} state_e;
  state_e state_q, state_d;

  logic [IDX_W-1:0]           index;
  logic [WO_W-1:0]            word;
  logic [TAG_W-1:0]           tag;
  logic                       line_valid;
  logic [TAG_W-1:0]           line_tag;
  logic [WPL-1:0][DATA_W-1:0] line_block;
  logic                       hit;

  logic                       wr_en;
  logic [WO_W-1:0]            wr_word;
  logic [BE_W-1:0]            wr_be;
  logic [DATA_W-1:0]          wr_data;
  logic                       tag_we;

  always_comb begin
    index = addr[WO_W + BO_W +: IDX_W];
    word  = addr[BO_W +: WO_W];
    tag   = addr[TAG_LSB +: TAG_W];
    hit   = line_valid && (line_tag == tag);
  end

  cache_mem #(
    .LINES(LINES), .WPL(WPL), .TAG_W(TAG_W), .DATA_W(DATA_W)
  ) u_mem (
    .clk, .rst_n,
    .rd_index (index),
    .rd_valid (line_valid),
    .rd_tag   (line_tag),
    .rd_block (line_block),
    .wr_en, .wr_index(index), .wr_word, .wr_be, .wr_data,
    .tag_we, .tag_index(index), .tag_data(tag)
  );

  always_comb begin
    state_d   = state_q;
    cpu_ack   = 1'b0;
    cpu_rdata = line_block[word];
    mc_req    = 1'b0;
    mc_we     = cpu_we;
    mc_burst  = 1'b0;
    mc_addr   = addr;
    mc_wdata  = cpu_wdata;
    mc_be     = cpu_be;
    wr_en     = 1'b0;
    wr_word   = word;
    wr_be     = cpu_be;
    wr_data   = cpu_wdata;
    tag_we    = 1'b0;
    ev_hit    = 1'b0;
    ev_miss   = 1'b0;
    ev_bypass = 1'b0;
    unique case (state_q)
      S_IDLE: if (cpu_req) begin
        if (nc) begin
          // non-cacheable indicator set: the cache is masked
          ev_bypass = 1'b1;
          state_d   = S_SINGLE;
        end else if (cpu_we) begin
          // write-through; update a resident block in place
          wr_en   = hit;
          state_d = S_SINGLE;
        end else if (hit) begin
          ev_hit  = 1'b1;
          cpu_ack = 1'b1;
        end else begin
          ev_miss = 1'b1;
          state_d = S_FILL;
        end
      end
      S_SINGLE: begin
        mc_req    = 1'b1;
        cpu_rdata = mc_rdata;
        if (mc_done) begin
          cpu_ack = 1'b1;
          state_d = S_IDLE;
        end
      end
      S_FILL: begin
        mc_req   = 1'b1;
        mc_we    = 1'b0;
        mc_burst = 1'b1;
        wr_en    = mc_beat_valid;
        wr_word  = mc_beat_idx;
        wr_be    = '1;
        wr_data  = mc_rdata;
        if (mc_done) begin
          tag_we  = 1'b1;
          state_d = S_IDLE;
        end
      end
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= S_IDLE;
    else        state_q <= state_d;
  end

  // CPU rule: a request is held until it is acknowledged.
  a_cpu_hold: assert property (@(posedge clk) disable iff (!rst_n)
    cpu_req && !cpu_ack |=> cpu_req && $stable(addr) && $stable(nc) && $stable(cpu_we));

  // A masked access never touches the cache storage.
  a_nc_masked: assert property (@(posedge clk) disable iff (!rst_n)
    cpu_req && nc |-> !tag_we && !(wr_en && state_q != S_FILL));

endmodule
