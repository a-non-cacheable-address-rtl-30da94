// tb_cache_ctrl: the cache controller (with its cache storage) driven with
// decoded accesses, behind the memory controller and the behavioural memory.
// Random reads and writes, cacheable and non-cacheable, over a few blocks that
// collide in a 4-line cache, interleaved with writes by another bus master
// straight into memory. Every read is compared with the reference model: a
// masked read must return memory, a cacheable read the cached copy (stale or
// not). Memory contents after each write, the event pulses and the cycles to
// acknowledge (hit 0, masked access or write LAT+2, miss 4*LAT+6) are checked.
module tb_cache_ctrl;
  import cache_ref_pkg::*;
  localparam int LAT = 1, LINES = 4;
  logic clk = 0, rst_n = 0;
  logic cpu_req, cpu_we, nc, cpu_ack;
  logic [31:0] addr, cpu_wdata, cpu_rdata;
  logic [3:0] cpu_be;
  logic mc_req, mc_we, mc_burst, mc_beat_valid, mc_done;
  logic [31:0] mc_addr, mc_wdata, mc_rdata;
  logic [3:0] mc_be;
  logic [1:0] mc_beat_idx;
  logic ev_hit, ev_miss, ev_bypass;
  logic mem_req, mem_we, mem_ack;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [3:0] mem_be;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_nc = 0, n_stale = 0, n_masked_resident = 0;
  int n_wr_hit = 0, n_wr_miss = 0, n_other = 0;
  cache_ref ref_c;

  cache_ctrl #(.ADDR_W(32), .DATA_W(32), .WPL(4), .LINES(LINES)) dut (.*);
  mem_ctrl #(.ADDR_W(32), .DATA_W(32), .WPL(4)) u_mc (
    .clk, .rst_n, .req(mc_req), .we(mc_we), .burst(mc_burst), .addr(mc_addr),
    .wdata(mc_wdata), .be(mc_be), .beat_valid(mc_beat_valid),
    .beat_idx(mc_beat_idx), .rdata(mc_rdata), .done(mc_done),
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_be, .mem_ack, .mem_rdata);
  ext_mem_model #(.LAT(LAT)) u_mem (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic access(input logic w, input logic n, input logic [31:0] a,
                        input logic [31:0] d, input logic [3:0] e);
    int cyc = 0, hits = 0, misses = 0, byps = 0;
    logic [31:0] exp, blk [4];
    bit was_hit = ref_c.hit(a);
    int exp_cyc;
    // prediction
    if (n) begin
      exp = u_mem.peek(a);
      exp_cyc = LAT + 2;
      if (was_hit) n_masked_resident++;
      n_nc++;
    end else if (w) begin
      exp_cyc = LAT + 2;
      if (was_hit) begin ref_c.write_hit(a, d, e); n_wr_hit++; end
      else n_wr_miss++;
    end else if (was_hit) begin
      exp = ref_c.word(a);
      exp_cyc = 0;
      if (exp !== u_mem.peek(a)) n_stale++;
      n_hit++;
    end else begin
      for (int k = 0; k < 4; k++) blk[k] = u_mem.peek({a[31:4], 4'h0} + 32'(4 * k));
      ref_c.fill(a, blk);
      exp = ref_c.word(a);
      exp_cyc = 4 * LAT + 6;
      n_miss++;
    end
    @(negedge clk);
    cpu_req = 1; cpu_we = w; nc = n; addr = a; cpu_wdata = d; cpu_be = e;
    forever begin
      #1;
      hits += int'(ev_hit); misses += int'(ev_miss); byps += int'(ev_bypass);
      if (cpu_ack) break;
      @(negedge clk);
      cyc++;
    end
    if (!w) expect_eq("read data", cpu_rdata, exp);
    expect_eq("cycles to ack", 32'(cyc), 32'(exp_cyc));
    expect_eq("bypass pulses", 32'(byps), 32'(n));
    expect_eq("miss pulses", 32'(misses), 32'(!n && !w && !was_hit));
    expect_eq("hit pulses", 32'(hits), 32'(!n && !w));
    @(negedge clk);
    cpu_req = 0;
  endtask

  initial begin
    logic [31:0] blocks [8];
    ref_c = new(LINES);
    cpu_req = 0; cpu_we = 0; nc = 0; addr = 0; cpu_wdata = 0; cpu_be = 0;
    for (int i = 0; i < 8; i++) blocks[i] = 32'h00FD_0000 + 32'(i * 16 * 3);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      automatic logic [31:0] a = blocks[$urandom % 8] + 32'(4 * ($urandom % 4));
      automatic int r = $urandom % 10;
      if (r == 0) begin
        u_mem.poke(a, $urandom, 4'hF);   // another master writes memory
        n_other++;
      end else begin
        automatic logic w = (r <= 3);
        automatic logic n = ($urandom % 3 == 0);
        automatic logic [31:0] d = $urandom;
        automatic logic [3:0] e = 4'($urandom);
        automatic logic [31:0] exp_mem = u_mem.peek(a);
        for (int k = 0; k < 4; k++) if (e[k]) exp_mem[8*k +: 8] = d[8*k +: 8];
        access(w, n, a, d, e);
        if (w) expect_eq("memory after write", u_mem.peek(a), exp_mem);
      end
    end
    $display("hits=%0d misses=%0d masked=%0d masked_resident=%0d stale_reads=%0d wr_hit=%0d wr_miss=%0d other_master=%0d",
             n_hit, n_miss, n_nc, n_masked_resident, n_stale, n_wr_hit, n_wr_miss, n_other);
    expect_eq("top address bit on bus", u_mem.msb_errors, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
