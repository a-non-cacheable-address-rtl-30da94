// tb_nc_cache_system: end-to-end test of the whole cache subsystem at its
// default parameters, with a behavioural memory (one wait cycle per word).
//
// 1. The example program of the mirroring scheme: a word at 0x00FD_0000 is
//    used only through its mirror 0x80FD_0000 while its neighbour 0x00FD_0004
//    is cached. The neighbour's read miss pulls the whole block, the shared
//    word included, into the cache; the mirrored accesses must still go to
//    memory, reach it with the top bit cleared, and leave the stale cached
//    copy untouched.
// 2. Another bus master rewrites memory: the mirrored read sees the new value,
//    the cacheable read of the same word returns the stale cached copy.
// 3. A 64 KByte non-cacheable area 0x0C01_0000..0x0C01_FFFF reached through
//    0x8C01_0000..0x8C01_FFFF: never cached, while its plain addresses are.
// 4. Random traffic against the reference model.
// Each mechanism (hit, fill, masked read, masked write, masked access to a
// resident block, stale read, write hit, write miss, other-master write) is
// counted and must occur at least once.
module tb_nc_cache_system;
  import cache_ref_pkg::*;
  localparam int LAT = 1;
  logic clk = 0, rst_n = 0;
  logic cpu_req, cpu_we, cpu_ack;
  logic [31:0] cpu_addr, cpu_wdata, cpu_rdata;
  logic [3:0] cpu_be;
  logic mem_req, mem_we, mem_ack;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic [3:0] mem_be;
  logic ev_hit, ev_miss, ev_bypass;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_nc_rd = 0, n_nc_wr = 0, n_masked_resident = 0;
  int n_stale = 0, n_wr_hit = 0, n_wr_miss = 0, n_other = 0;
  int n_ev_hit = 0, n_ev_miss = 0, n_ev_bypass = 0;
  cache_ref ref_c;

  nc_cache_system dut (.*);
  ext_mem_model #(.LAT(LAT)) u_mem (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    n_ev_hit    <= n_ev_hit + int'(ev_hit);
    n_ev_miss   <= n_ev_miss + int'(ev_miss);
    n_ev_bypass <= n_ev_bypass + int'(ev_bypass);
  end

  initial begin
    repeat (200000) @(posedge clk);
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

  // One CPU access; predicts data and latency from the reference model.
  task automatic access(input logic w, input logic [31:0] a, input logic [31:0] d,
                        input logic [3:0] e, output logic [31:0] rd);
    int cyc = 0, exp_cyc;
    bit n = a[31];
    logic [31:0] pa = {1'b0, a[30:0]};
    logic [31:0] exp, exp_mem, blk [4];
    bit was_hit = ref_c.hit(pa);
    bit saw_bus = 0;
    exp_mem = u_mem.peek(pa);
    for (int k = 0; k < 4; k++) if (e[k]) exp_mem[8*k +: 8] = d[8*k +: 8];
    if (n) begin
      exp = u_mem.peek(pa);
      exp_cyc = LAT + 2;
      if (was_hit) n_masked_resident++;
      if (w) n_nc_wr++; else n_nc_rd++;
    end else if (w) begin
      exp_cyc = LAT + 2;
      if (was_hit) begin ref_c.write_hit(pa, d, e); n_wr_hit++; end
      else n_wr_miss++;
    end else if (was_hit) begin
      exp = ref_c.word(pa);
      exp_cyc = 0;
      if (exp !== u_mem.peek(pa)) n_stale++;
      n_hit++;
    end else begin
      for (int k = 0; k < 4; k++) blk[k] = u_mem.peek({pa[31:4], 4'h0} + 32'(4 * k));
      ref_c.fill(pa, blk);
      exp = ref_c.word(pa);
      exp_cyc = 4 * LAT + 6;
      n_miss++;
    end
    @(negedge clk);
    cpu_req = 1; cpu_we = w; cpu_addr = a; cpu_wdata = d; cpu_be = e;
    forever begin
      #1;
      if (mem_req && mem_ack && (n || w)) begin
        saw_bus = 1;
        expect_eq("bus address of single access", mem_addr, pa);
      end
      if (cpu_ack) break;
      @(negedge clk);
      cyc++;
    end
    rd = cpu_rdata;
    if (!w) expect_eq("read data", cpu_rdata, exp);
    if (n || w) expect_eq("single access reached the bus", 32'(saw_bus), 1);
    expect_eq("cycles to ack", 32'(cyc), 32'(exp_cyc));
    @(negedge clk);
    cpu_req = 0;
    if (w) expect_eq("memory after write", u_mem.peek(pa), exp_mem);
  endtask

  initial begin
    logic [31:0] rd, k_old;
    int fills;
    ref_c = new(64);
    cpu_req = 0; cpu_we = 0; cpu_addr = 0; cpu_wdata = 0; cpu_be = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. example program
    access(1, 32'h00FD_0004, 32'h66, 4'hF, rd);      // pBUF_B1 = 0x66
    access(1, 32'h80FD_0000, 32'h77, 4'hF, rd);      // vBUF_B  = 0x77
    access(0, 32'h00FD_0004, 0, 4'hF, rd);           // Cac_B1 = pBUF_B1 (fill)
    expect_eq("Cac_B1", rd, 32'h66);
    access(0, 32'h80FD_0000, 0, 4'hF, rd);           // Non_B = vBUF_B (masked)
    expect_eq("Non_B", rd, 32'h77);
    // CPU writes the mirrored word: memory changes, the cached copy does not
    access(1, 32'h80FD_0000, 32'hABCD_0001, 4'hF, rd);
    expect_eq("memory at 0x00FD0000", u_mem.peek(32'h00FD_0000), 32'hABCD_0001);
    access(0, 32'h80FD_0000, 0, 4'hF, rd);
    expect_eq("mirrored read after write", rd, 32'hABCD_0001);
    access(0, 32'h00FD_0000, 0, 4'hF, rd);           // plain address: stale copy
    expect_eq("stale cached copy", rd, 32'h77);
    // byte-sized variable through the mirror
    access(1, 32'h80FD_0001, 32'h0000_5A00, 4'b0010, rd);
    expect_eq("byte write via mirror", u_mem.peek(32'h00FD_0000), 32'hABCD_5A01);

    // 2. another bus master changes memory behind the cache
    k_old = 32'h77;
    u_mem.poke(32'h00FD_0000, 32'h1234_5678, 4'hF); n_other++;
    access(0, 32'h80FD_0000, 0, 4'hF, rd);
    expect_eq("mirrored read sees other master", rd, 32'h1234_5678);
    access(0, 32'h00FD_0000, 0, 4'hF, rd);
    expect_eq("cached read keeps old copy", rd, k_old);

    // 3. non-cacheable area 0x0C01_0000..0x0C01_FFFF via its mirror
    fills = n_ev_miss;
    for (int i = 0; i < 64; i++) begin
      automatic logic [31:0] off = {16'h0, 16'($urandom)} & 32'h0000_FFFC;
      access(0, 32'h8C01_0000 | off, 0, 4'hF, rd);
      access(1, 32'h8C01_0000 | off, $urandom, 4'hF, rd);
    end
    access(0, 32'h8C01_FFFC, 0, 4'hF, rd);
    expect_eq("no fill from mirrored area", 32'(n_ev_miss - fills), 0);
    access(0, 32'h0C01_0000, 0, 4'hF, rd);           // same memory, cached
    access(0, 32'h0C01_0000, 0, 4'hF, rd);

    // 4. random traffic over colliding blocks
    for (int i = 0; i < 4000; i++) begin
      automatic logic [31:0] pa = 32'h0C01_0000 + 32'(($urandom % 12) * 1024)
                                  + 32'(4 * ($urandom % 4));
      automatic int r = $urandom % 10;
      if (r == 0) begin
        u_mem.poke(pa, $urandom, 4'hF);
        n_other++;
      end else begin
        automatic logic nc = ($urandom % 3 == 0);
        access(r <= 3, {nc, pa[30:0]}, $urandom, 4'($urandom), rd);
      end
    end

    $display("hits=%0d fills=%0d masked_rd=%0d masked_wr=%0d masked_resident=%0d stale=%0d wr_hit=%0d wr_miss=%0d other_master=%0d",
             n_hit, n_miss, n_nc_rd, n_nc_wr, n_masked_resident, n_stale, n_wr_hit, n_wr_miss, n_other);
    expect_eq("hit pulses (hits and re-lookups after fills)", 32'(n_ev_hit), 32'(n_hit + n_miss));
    expect_eq("fill pulses", 32'(n_ev_miss), 32'(n_miss));
    expect_eq("bypass pulses", 32'(n_ev_bypass), 32'(n_nc_rd + n_nc_wr));
    expect_eq("top address bit on bus", u_mem.msb_errors, 0);
    begin
      automatic int mech [9] = '{n_hit, n_miss, n_nc_rd, n_nc_wr, n_masked_resident, n_stale,
                       n_wr_hit, n_wr_miss, n_other};
      for (int m = 0; m < 9; m++) begin
        checks++;
        if (mech[m] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never happened", m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
