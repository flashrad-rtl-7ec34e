// ftl_lbt: logical-to-physical translation through the logical block table.
//
// The table lives in a RAM of the stack (MRAM) and holds one 4-byte
// physical block number per 16 logical sectors (8 KiB). The upper bits of
// the logical sector address index the RAM directly; the low four bits are
// the sector's place inside the physical block, where sectors lie in order
// and need no further translation. A physical block number is {die, block in
// die}; the all-ones entry means "unmapped" (free). Three requests are
// served, one at a time:
//   lookup            read the entry for a logical sector
//   lookup + alloc    as lookup, but an unmapped entry is given a block from
//                     the free-block table and written back (first write)
//   update            overwrite an entry (relocation after a failed program)
// Updates win over lookups when both are pending. The direct-indexed 4-byte
// table on 16-sector granularity follows the cube; the request handshakes,
// the all-ones free marker and the single-cycle-read RAM port are this
// design's choices.
// Timing: lookup answers on `rsp_valid` three clocks after it is accepted
// (RAM read, check, answer), four when it allocates.
module ftl_lbt
  import flash_pkg::*;
#(
  parameter int unsigned LSA_BITS = LSA_W,
  localparam int unsigned LBI_W   = LSA_BITS - 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup
  input  logic                lk_valid,
  output logic                lk_ready,
  input  logic [LSA_BITS-1:0] lk_lsa,
  input  logic                lk_alloc,
  output logic                rsp_valid,
  output logic [PBN_W-1:0]    rsp_pbn,
  output logic [3:0]          rsp_sector,
  output logic [LBI_W-1:0]    rsp_lbi,
  output logic                rsp_unmapped,  // lookup found no mapping
  output logic                rsp_new,       // a block was just allocated
  // update
  input  logic                up_valid,
  output logic                up_ready,
  input  logic [LBI_W-1:0]    up_lbi,
  input  logic [PBN_W-1:0]    up_pbn,
  // free-block table
  output logic                alloc_req,
  input  logic [PBN_W-1:0]    alloc_pbn,
  // table RAM, read data one clock after a read
  output logic                ram_en,
  output logic                ram_we,
  output logic [LBI_W-1:0]    ram_addr,
  output logic [PBN_W-1:0]    ram_wdata,
  input  logic [PBN_W-1:0]    ram_rdata
);
  typedef enum logic [2:0] {S_IDLE, S_RD, S_CHK, S_ALLOC, S_RSP} st_e;
  st_e st_q;
  logic [LBI_W-1:0] lbi_q;
  logic [3:0]       sec_q;
  logic             alloc_q, unm_q, new_q;
  logic [PBN_W-1:0] pbn_q;

  wire take_up = (st_q == S_IDLE) && up_valid;
  wire take_lk = (st_q == S_IDLE) && !up_valid && lk_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q    <= S_IDLE;
      lbi_q   <= '0;
      sec_q   <= '0;
      alloc_q <= 1'b0;
      unm_q   <= 1'b0;
      new_q   <= 1'b0;
      pbn_q   <= '0;
    end else begin
      unique case (st_q)
        S_IDLE: if (take_lk) begin
          lbi_q   <= lk_lsa[LSA_BITS-1:4];
          sec_q   <= lk_lsa[3:0];
          alloc_q <= lk_alloc;
          st_q    <= S_RD;
        end
        S_RD:  st_q <= S_CHK;
        S_CHK: begin
          pbn_q <= ram_rdata;
          new_q <= 1'b0;
          unm_q <= 1'b0;
          if (ram_rdata == PBN_FREE) begin
            if (alloc_q) st_q <= S_ALLOC;
            else begin
              unm_q <= 1'b1;
              st_q  <= S_RSP;
            end
          end else begin
            st_q <= S_RSP;
          end
        end
        S_ALLOC: begin
          pbn_q <= alloc_pbn;
          new_q <= 1'b1;
          st_q  <= S_RSP;
        end
        S_RSP: st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    ram_en    = take_up || (st_q == S_RD) || (st_q == S_ALLOC);
    ram_we    = take_up || (st_q == S_ALLOC);
    ram_addr  = take_up ? up_lbi : lbi_q;
    ram_wdata = take_up ? up_pbn : alloc_pbn;
  end

  assign up_ready     = (st_q == S_IDLE);
  assign lk_ready     = take_lk;
  assign alloc_req    = (st_q == S_ALLOC);
  assign rsp_valid    = (st_q == S_RSP);
  assign rsp_pbn      = pbn_q;
  assign rsp_sector   = sec_q;
  assign rsp_lbi      = lbi_q;
  assign rsp_unmapped = unm_q;
  assign rsp_new      = new_q;
endmodule
