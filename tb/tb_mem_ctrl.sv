// tb_mem_ctrl: drives the memory controller against the behavioural memory
// (two wait cycles per word). Checks single reads, byte-enabled single writes
// and block fills: the bus addresses (block-aligned, in word order, top bit
// never set), the beat indices and data returned, the memory contents after a
// write, and the number of cycles from request to done (LAT+1 per single
// access, 4*(LAT+1) per 4-word fill).
module tb_mem_ctrl;
  localparam int LAT = 2;
  logic clk = 0, rst_n = 0;
  logic req, we, burst, beat_valid, done;
  logic [31:0] addr, wdata, rdata;
  logic [3:0] be;
  logic [1:0] beat_idx;
  logic mem_req, mem_we, mem_ack;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [3:0] mem_be;
  int checks = 0, failures = 0;

  mem_ctrl #(.ADDR_W(32), .DATA_W(32), .WPL(4)) dut (.*);
  ext_mem_model #(.LAT(LAT)) u_mem (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Runs one transfer; returns the cycles to done and checks every beat.
  task automatic run(input logic w, input logic b, input logic [31:0] a,
                     input logic [31:0] d, input logic [3:0] e);
    int n = 0, beats = 0;
    logic [31:0] base = b ? {a[31:4], 4'h0} : a;
    @(negedge clk);
    req = 1; we = w; burst = b; addr = a; wdata = d; be = e;
    forever begin
      #1;
      if (beat_valid) begin
        logic [31:0] ea = b ? base + 32'(beats * 4) : a;
        expect_eq("bus address", mem_addr, ea);
        expect_eq("bus we", 32'(mem_we), 32'(w && !b));
        if (b) expect_eq("beat index", 32'(beat_idx), 32'(beats));
        if (!w || b) expect_eq("read data", rdata, u_mem.peek(ea));
        beats++;
      end
      if (done) break;
      @(negedge clk);
      n++;
    end
    expect_eq("beats", 32'(beats), b ? 4 : 1);
    expect_eq("cycles to done", 32'(n), b ? 4 * (LAT + 1) : LAT + 1);
    @(negedge clk);
    req = 0;
  endtask

  initial begin
    logic [31:0] prev;
    req = 0; we = 0; burst = 0; addr = 0; wdata = 0; be = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 0, 32'h00FD_0004, 0, 4'hF);                 // single read
    prev = u_mem.peek(32'h00FD_0000);
    run(1, 0, 32'h00FD_0000, 32'h1122_3344, 4'b0101);   // byte-enabled write
    expect_eq("written word", u_mem.peek(32'h00FD_0000),
              {prev[31:24], 8'h22, prev[15:8], 8'h44});
    run(0, 1, 32'h00FD_0008, 0, 4'hF);                 // fill from mid-block
    run(0, 1, 32'h0C01_FFFC, 0, 4'hF);
    for (int i = 0; i < 40; i++) begin
      automatic logic [31:0] a = {2'b00, 28'($urandom), 2'b00};
      automatic logic [31:0] d = $urandom;
      automatic logic [3:0] e = 4'($urandom);
      automatic logic w = 1'($urandom), b = 1'($urandom);
      prev = u_mem.peek(a);
      run(w && !b, b, a, d, e);
      if (w && !b) begin
        automatic logic [31:0] exp = prev;
        for (int k = 0; k < 4; k++) if (e[k]) exp[8*k +: 8] = d[8*k +: 8];
        expect_eq("written word", u_mem.peek(a), exp);
      end
    end
    expect_eq("top address bit on bus", u_mem.msb_errors, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
