// ext_mem_model: behavioural model of the external main memory on the memory
// bus, for simulation only (not synthesizable).
//
// Sparse word storage over the whole 32-bit byte address space: a word never
// written reads as a fixed function of its address (init_word). A request is
// acknowledged after LAT wait cycles; read data is valid with mem_ack and a
// write lands on the acknowledging clock edge, byte enables honoured. The
// memory only ever sees physical addresses, so any request with the top
// address bit set is counted in msb_errors. poke() and peek() let a testbench
// act as another bus master changing memory behind the cache's back.
module ext_mem_model #(
  parameter int unsigned LAT = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mem_req,
  input  logic        mem_we,
  input  logic [31:0] mem_addr,
  input  logic [31:0] mem_wdata,
  input  logic [3:0]  mem_be,
  output logic        mem_ack,
  output logic [31:0] mem_rdata
);

  logic [31:0] store [int unsigned];
  int unsigned wait_q;
  int unsigned msb_errors;
  int unsigned reads, writes;

  function automatic logic [31:0] init_word(input logic [31:0] a);
    return {a[31:2], 2'b00} ^ 32'h5A3C_96E1;
  endfunction

  function automatic logic [31:0] peek(input logic [31:0] a);
    int unsigned k = int'(a >> 2);
    return store.exists(k) ? store[k] : init_word(a);
  endfunction

  function automatic void poke(input logic [31:0] a, input logic [31:0] d,
                               input logic [3:0] be);
    logic [31:0] w = peek(a);
    for (int b = 0; b < 4; b++) if (be[b]) w[8*b +: 8] = d[8*b +: 8];
    store[int'(a >> 2)] = w;
  endfunction

  assign mem_ack   = mem_req && (wait_q == LAT);
  assign mem_rdata = peek(mem_addr);

  initial begin
    msb_errors = 0;
    reads      = 0;
    writes     = 0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wait_q <= 0;
    else if (mem_req && !mem_ack) wait_q <= wait_q + 1;
    else wait_q <= 0;
  end

  always @(posedge clk) begin
    if (rst_n && mem_req && mem_addr[31]) msb_errors <= msb_errors + 1;
    if (mem_ack) begin
      if (mem_we) begin
        poke(mem_addr, mem_wdata, mem_be);
        writes <= writes + 1;
      end else begin
        reads <= reads + 1;
      end
    end
  end

endmodule
