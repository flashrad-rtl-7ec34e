// ftl_lbt_tb: runs lookups, first-write allocations and updates against a
// table RAM model (unwritten entries read as all ones) and a reference map
// kept in the testbench. Checks the returned block, sector offset, logical
// block index and flags, that allocation writes the new block into the RAM,
// that an update wins over a pending lookup, and the 3/4-clock response
// latency.
module ftl_lbt_tb;
  import flash_pkg::*;
  localparam int LB = 28, LI = LB - 4;
  logic clk = 0, rst_n = 0;
  logic lk_valid = 0, lk_ready, lk_alloc = 0, rsp_valid, rsp_unmapped, rsp_new;
  logic [LB-1:0] lk_lsa = 0;
  logic [31:0] rsp_pbn, up_pbn = 0, alloc_pbn, ram_wdata, ram_rdata;
  logic [3:0] rsp_sector;
  logic [LI-1:0] rsp_lbi, up_lbi = 0, ram_addr;
  logic up_valid = 0, up_ready, alloc_req, ram_en, ram_we;
  int checks = 0, failures = 0;
  logic [31:0] ram [int];
  logic [31:0] refm [int];
  logic [31:0] next_free = 32'h0010_0000;
  int n_alloc = 0;

  ftl_lbt dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // table RAM model and free-block source
  assign alloc_pbn = next_free;
  always @(posedge clk) begin
    if (ram_en && ram_we) ram[int'(ram_addr)] = ram_wdata;
    if (ram_en && !ram_we) ram_rdata <= ram.exists(int'(ram_addr)) ? ram[int'(ram_addr)] : 32'hFFFF_FFFF;
    if (alloc_req) begin next_free <= next_free + 1; n_alloc++; end
  end

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic lookup(input logic [LB-1:0] lsa, input bit alloc);
    int cyc = 0;
    int li = int'(lsa[LB-1:4]);
    bit mapped = refm.exists(li);
    logic [31:0] expb = mapped ? refm[li] : next_free;
    @(negedge clk); lk_valid = 1; lk_lsa = lsa; lk_alloc = alloc;
    #1;
    while (!lk_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1;
    lk_valid = 0;
    while (!rsp_valid) begin @(posedge clk); #1; cyc++; end
    chk(cyc == ((!mapped && alloc) ? 3 : 2), $sformatf("latency %0d", cyc + 1));
    chk(rsp_sector == lsa[3:0] && rsp_lbi == lsa[LB-1:4], "sector/lbi");
    if (mapped) chk(!rsp_unmapped && !rsp_new && rsp_pbn == expb, $sformatf("mapped %h exp %h", rsp_pbn, expb));
    else if (alloc) begin
      chk(!rsp_unmapped && rsp_new && rsp_pbn == expb, "allocated");
      refm[li] = expb;
    end else chk(rsp_unmapped, "unmapped");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    lookup(28'h0000025, 0);              // unmapped read
    lookup(28'h0000025, 1);              // first write allocates
    lookup(28'h000002A, 0);              // same logical block, other sector
    for (int n = 0; n < 300; n++) lookup(28'($urandom_range(4095)) << ($urandom_range(1) * 12), $urandom_range(1));
    chk(n_alloc == refm.size(), "allocation count");
    foreach (refm[k]) chk(ram[k] == refm[k], "RAM contents");
    // update while a lookup is also pending: update goes first
    @(posedge clk);
    @(negedge clk);
    up_valid = 1; up_lbi = 24'h000002; up_pbn = 32'h00ABCDE; lk_valid = 1; lk_lsa = 28'h0000021; lk_alloc = 0;
    #1;
    checks++; if (!up_ready || lk_ready) begin failures++; $display("update priority"); end
    @(posedge clk); #1; up_valid = 0;
    @(negedge clk);
    while (!lk_ready) @(negedge clk);
    @(posedge clk); #1;
    lk_valid = 0;
    while (!rsp_valid) begin @(posedge clk); #1; end
    chk(rsp_pbn == 32'h00ABCDE && rsp_sector == 4'h1, $sformatf("lookup after update %h %h", rsp_pbn, rsp_sector));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
