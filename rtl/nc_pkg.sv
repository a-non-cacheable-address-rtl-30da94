// nc_pkg: shared constants of the non-cacheable mirroring cache system.
//
// The CPU issues 32-bit byte addresses. Bit 31 (the MSB, unused by the 1 GByte
// physical memory map) is the non-cacheable indicator: addresses 0x8000_0000 and
// up are a mirror of the physical space that bypasses the cache. The cache holds
// blocks of four 32-bit words. The address width, the indicator position, the
// 1 GByte physical space and the 4-word block follow the scheme; the number of
// cache lines is this design's own choice.
package nc_pkg;

  localparam int unsigned ADDR_W   = 32;  // CPU / bus address width
  localparam int unsigned DATA_W   = 32;  // word width
  localparam int unsigned NC_BIT   = ADDR_W - 1;  // non-cacheable indicator bit
  localparam int unsigned WPL      = 4;   // words per cache block
  localparam int unsigned LINES    = 64;  // cache lines (design choice)

endpackage
