// mgmt_unit_tb: four channels raise management events at once and at random.
// Checks round-robin grant order, that a program failure gets a fresh block
// of the same die, rewrites the table entry of its logical block and lands
// in both the bad-block queue (marked write failure) and the GC queue, that
// read-error and erase-failure events only enter the bad-block queue with
// their marker, that the interrupt follows the queue, and that allocation
// waits while the shared port is busy.
module mgmt_unit_tb;
  import flash_pkg::*;
  localparam int NCH = 4, LI = 24;
  logic clk = 0, rst_n = 0;
  logic [NCH-1:0] evt_req = 0, evt_gnt;
  bb_cause_e evt_cause [NCH];
  logic [31:0] evt_pbn [NCH];
  logic [LI-1:0] evt_lbi [NCH];
  logic [31:0] gnt_pbn, alloc_pbn, up_pbn, bb_pbn, gc_pbn;
  logic alloc_req, alloc_busy = 0, up_valid, up_ready = 0;
  logic [4:0] alloc_die;
  logic [LI-1:0] up_lbi;
  logic bb_irq, bb_pop = 0, bb_overflow, gc_pop = 0, gc_empty, gc_overflow, clr_ovf = 0;
  bb_cause_e bb_cause;
  logic [15:0] n_relocations;
  int checks = 0, failures = 0;
  logic [18:0] blkctr = 19'd7000;
  int n_alloc_while_busy = 0;

  mgmt_unit #(.NUM_CH(NCH), .LBI_W(LI)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  assign alloc_pbn = {8'h0, alloc_die, blkctr};
  always @(posedge clk) begin
    if (alloc_req) blkctr <= blkctr + 1;
    if (alloc_req && alloc_busy) n_alloc_while_busy++;
    alloc_busy <= ($urandom_range(3) == 0);
    up_ready   <= ($urandom_range(1) == 0);
  end

  // expected queue contents
  bb_cause_e ebc [$];
  logic [31:0] ebp [$], egc [$];
  logic [31:0] upd_pbn [int];
  int gnt_order [$];

  task automatic chk(input bit ok, input string m);
    checks++; if (!ok) begin failures++; $display("FAIL %s", m); end
  endtask

  // one process per channel: raise events, wait for grant
  for (genvar c = 0; c < NCH; c++) begin : g_src
    initial begin
      evt_cause[c] = BB_NONE; evt_pbn[c] = 0; evt_lbi[c] = 0;
      wait (rst_n);
      for (int n = 0; n < 30; n++) begin
        logic [31:0] p;
        bb_cause_e cs;
        if (n > 0) repeat ($urandom_range(20)) @(posedge clk);
        cs = bb_cause_e'($urandom_range(3, 1));
        p = {8'h0, 5'(c), 19'($urandom)};
        @(negedge clk);
        evt_req[c] = 1; evt_cause[c] = cs; evt_pbn[c] = p; evt_lbi[c] = 24'(c * 1000 + n);
        do @(posedge clk); while (!evt_gnt[c]);
        #1;
        evt_req[c] = 0;
        gnt_order.push_back(c);
        ebc.push_back(cs); ebp.push_back(p);
        if (cs == BB_WRITE_FAIL) begin
          chk(gnt_pbn[23:19] == 5'(c), "relocation on same die");
          chk(upd_pbn.exists(c * 1000 + n) && upd_pbn[c * 1000 + n] == gnt_pbn, "table updated with new block");
          egc.push_back(p);
        end
      end
    end
  end

  always @(posedge clk) if (up_valid && up_ready) upd_pbn[int'(up_lbi)] = up_pbn;

  // processor: drain the queues and compare
  int popped = 0;
  initial begin
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (bb_irq && ebc.size() > 0) begin
        chk(bb_cause == ebc[0] && bb_pbn == ebp[0], $sformatf("bb head %0d %h exp %0d %h", bb_cause, bb_pbn, ebc[0], ebp[0]));
        bb_pop = 1; void'(ebc.pop_front()); void'(ebp.pop_front()); popped++;
      end else bb_pop = 0;
      if (!gc_empty && egc.size() > 0) begin
        chk(gc_pbn == egc[0], "gc head");
        gc_pop = 1; void'(egc.pop_front());
      end else gc_pop = 0;
    end
  end

  initial begin
    int nwf;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (gnt_order.size() == 4);
    chk(gnt_order[0] == 0 && gnt_order[1] == 1 && gnt_order[2] == 2 && gnt_order[3] == 3, "round robin order");
    wait (gnt_order.size() == NCH * 30);
    repeat (10) @(posedge clk);
    chk(popped == NCH * 30, $sformatf("popped %0d", popped));
    chk(!bb_irq && gc_empty, "queues drained");
    chk(n_alloc_while_busy == 0, "allocation while port busy");
    nwf = upd_pbn.size();
    chk(n_relocations == 16'(nwf) && nwf > 0, "relocation count");
    chk(!bb_overflow && !gc_overflow, "no overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
