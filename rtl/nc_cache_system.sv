// nc_cache_system: cache subsystem of an MMU-less embedded processor in which
// the unused most significant address bit marks an access as non-cacheable.
//
// The processor's 32-bit address first passes the decoder, which is only
// wiring: bit 31 becomes the non-cacheable indicator and is cleared in the
// address handed on, so mem_addr[31] is always 0. The physical memory is
// 1 GByte, so addresses 0x8000_0000..0xFFFF_FFFF form a mirror of the physical
// space: software reaches any variable uncached by using its address with bit
// 31 set, and cached through its plain address. The cache (cache_ctrl with its
// cache_mem) serves cacheable accesses and is masked for mirrored ones; the
// memory controller (mem_ctrl) carries single accesses and block fills to the
// external memory bus, always with the indicator cleared. No register or
// comparator defines the non-cacheable areas, and any byte can be reached
// either way. The processor and the external memory are outside this module:
// their ports are the cpu_* and mem_* signals.
//
// Timing, counting cycles after the one in which cpu_req is first presented,
// with a memory that acknowledges after W wait cycles: a cacheable read hit
// is acknowledged in the presenting cycle; a masked access or any write after
// W+2 cycles; a read miss after WPL*(W+1)+2 cycles (the fill, then a hit on
// the re-lookup). cpu_req and its fields are held until cpu_ack; the memory
// bus holds mem_req and its fields until mem_ack. The mirroring scheme, the
// 32-bit address with bit 31 as indicator and the 4-word block follow the
// scheme; the line count, direct mapping, write-through policy and both
// handshakes are this design's own choices.
module nc_cache_system #(
  parameter int unsigned ADDR_W = nc_pkg::ADDR_W,
  parameter int unsigned DATA_W = nc_pkg::DATA_W,
  parameter int unsigned WPL    = nc_pkg::WPL,
  parameter int unsigned LINES  = nc_pkg::LINES,
  parameter int unsigned NC_BIT = nc_pkg::NC_BIT,
  localparam int unsigned BE_W  = DATA_W / 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // processor port
  input  logic              cpu_req,
  input  logic              cpu_we,
  input  logic [ADDR_W-1:0] cpu_addr,
  input  logic [DATA_W-1:0] cpu_wdata,
  input  logic [BE_W-1:0]   cpu_be,
  output logic              cpu_ack,
  output logic [DATA_W-1:0] cpu_rdata,
  // memory bus
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  output logic [BE_W-1:0]   mem_be,
  input  logic              mem_ack,
  input  logic [DATA_W-1:0] mem_rdata,
  // event pulses (hit, block fill, masked access)
  output logic              ev_hit,
  output logic              ev_miss,
  output logic              ev_bypass
);

  localparam int unsigned WO_W = $clog2(WPL);

  logic              nc;
  logic [ADDR_W-1:0] phys_addr;

  logic              mc_req, mc_we, mc_burst, mc_beat_valid, mc_done;
  logic [ADDR_W-1:0] mc_addr;
  logic [DATA_W-1:0] mc_wdata, mc_rdata;
  logic [BE_W-1:0]   mc_be;
  logic [WO_W-1:0]   mc_beat_idx;

  // Decoder: the unused MSB is the non-cacheable indicator. It is cleared
  // before the address goes on, so nothing below sees it.
  always_comb begin
    nc                = cpu_addr[NC_BIT];
    phys_addr         = cpu_addr;
    phys_addr[NC_BIT] = 1'b0;
  end

  cache_ctrl #(
    .ADDR_W(ADDR_W), .DATA_W(DATA_W), .WPL(WPL), .LINES(LINES)
  ) u_cache (
    .clk, .rst_n,
    .cpu_req, .cpu_we, .nc, .addr(phys_addr), .cpu_wdata, .cpu_be,
    .cpu_ack, .cpu_rdata,
    .mc_req, .mc_we, .mc_burst, .mc_addr, .mc_wdata, .mc_be,
    .mc_beat_valid, .mc_beat_idx, .mc_rdata, .mc_done,
    .ev_hit, .ev_miss, .ev_bypass
  );

  mem_ctrl #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .WPL(WPL)) u_mc (
    .clk, .rst_n,
    .req(mc_req), .we(mc_we), .burst(mc_burst), .addr(mc_addr),
    .wdata(mc_wdata), .be(mc_be),
    .beat_valid(mc_beat_valid), .beat_idx(mc_beat_idx), .rdata(mc_rdata),
    .done(mc_done),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_be, .mem_ack, .mem_rdata
  );

endmodule
