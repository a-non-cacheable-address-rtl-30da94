// mem_ctrl: memory controller between the cache controller and the memory bus.
//
// It runs two kinds of transfer on the memory bus: a single word access (read
// or write, with byte enables), used for non-cacheable accesses and for writes,
// and a block fill of WPL word reads, used on a cache read miss. A block fill
// starts at the block-aligned address and walks the words in order; each word
// returned is handed back with its index (beat_valid, beat_idx, rdata) so the
// cache controller can store it, and the data of a single read is handed back
// the same way. The address it drives is the physical one: the non-cacheable
// indicator has already been cleared by the decoder, so a mirrored access to
// 0x80FD_0000 reaches memory as 0x00FD_0000.
//
// Internal side: the cache controller raises req with we/burst/addr/wdata/be
// and holds them until the cycle done is high; done comes with the last beat.
// Bus side: mem_req with mem_we/mem_addr/mem_wdata/mem_be stays stable until
// mem_ack; read data is valid with mem_ack. One bus word per acknowledged
// cycle, so a fill takes WPL bus transfers. The bus handshake and the burst
// ordering are this design's own choices; the scheme only says that the memory
// controller, not the cache, serves a non-cacheable access.
// The bus assertion uses rst_n synchronously (disable iff) while the
// registers reset asynchronously; lint notes the mix, which is intended.
module mem_ctrl #(
  parameter int unsigned ADDR_W = nc_pkg::ADDR_W,
  parameter int unsigned DATA_W = nc_pkg::DATA_W,
  parameter int unsigned WPL    = nc_pkg::WPL,
  localparam int unsigned BE_W  = DATA_W / 8,
  localparam int unsigned WO_W  = $clog2(WPL),
  localparam int unsigned BO_W  = $clog2(BE_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  // cache controller side
  input  logic              req,
  input  logic              we,
  input  logic              burst,      // 1: block fill of WPL words (read)
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [BE_W-1:0]   be,
  output logic              beat_valid,
  output logic [WO_W-1:0]   beat_idx,
  output logic [DATA_W-1:0] rdata,
  output logic              done,
  // memory bus side
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_wdata,
  output logic [BE_W-1:0]   mem_be,
  input  logic              mem_ack,
  input  logic [DATA_W-1:0] mem_rdata
);

  typedef enum logic {S_IDLE, S_BUSY} state_e;

  state_e              state_q;
  logic                we_q, burst_q;
  logic [ADDR_W-1:0]   base_q;
  logic [DATA_W-1:0]   wdata_q;
  logic [BE_W-1:0]     be_q;
  logic [WO_W-1:0]     cnt_q;
  logic                last;

  always_comb begin
    last       = !burst_q || (cnt_q == WO_W'(WPL - 1));
    mem_req    = (state_q == S_BUSY);
    mem_we     = we_q;
    mem_addr   = burst_q ? (base_q | (ADDR_W'(cnt_q) << BO_W)) : base_q;
    mem_wdata  = wdata_q;
    mem_be     = burst_q ? '1 : be_q;
    beat_valid = mem_req && mem_ack;
    beat_idx   = burst_q ? cnt_q : base_q[BO_W +: WO_W];
    rdata      = mem_rdata;
    done       = beat_valid && last;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      we_q    <= 1'b0;
      burst_q <= 1'b0;
      base_q  <= '0;
      wdata_q <= '0;
      be_q    <= '0;
      cnt_q   <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (req) begin
          state_q <= S_BUSY;
          we_q    <= we && !burst;
          burst_q <= burst;
          // a block fill starts at the first word of the block
          base_q  <= burst ? (addr & ~ADDR_W'(WPL * BE_W - 1)) : addr;
          wdata_q <= wdata;
          be_q    <= be;
          cnt_q   <= '0;
        end
        S_BUSY: if (mem_ack) begin
          if (last) state_q <= S_IDLE;
          else      cnt_q   <= cnt_q + 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // Bus rule: a request is held, unchanged, until it is acknowledged.
  a_bus_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req && !mem_ack |=> mem_req && $stable(mem_addr) && $stable(mem_we));

endmodule
