// lbt_ram_model: behavioural stand-in for the stack RAM that holds the
// logical block table (not synthesizable). Sparse storage; a location never
// written reads as all ones ("unmapped"). Read data appears one clock after
// a read, as the table port of the controller expects. `peek` and `poke`
// give the testbench direct access.
module lbt_ram_model #(
  parameter int AW = 24
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic [31:0]   rdata
);
  logic [31:0] mem [int];
  int n_writes = 0;

  function automatic logic [31:0] peek(input int a);
    return mem.exists(a) ? mem[a] : 32'hFFFF_FFFF;
  endfunction

  // testbench back door: overwrite an entry without a port cycle
  function automatic void poke(input int a, input logic [31:0] v);
    mem[a] = v;
  endfunction

  initial rdata = '1;
  always @(posedge clk) begin
    if (en && we) begin
      mem[int'(addr)] = wdata;
      n_writes++;
    end
    if (en && !we) rdata <= peek(int'(addr));
  end
endmodule
