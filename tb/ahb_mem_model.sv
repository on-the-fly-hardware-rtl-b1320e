// ahb_mem_model: behavioural AHB-Lite write slave standing in for the SDRAM
// controller in simulation. It stores every word written (NONSEQ/SEQ, word
// size) in an associative array indexed by byte address and inserts random
// wait states (HREADY low) with probability WAIT_PCT percent in each data
// phase. It counts the wait states it inserted. Reads are not modelled.
module ahb_mem_model #(
  parameter int WAIT_PCT = 30
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [2:0]  hsize,
  input  logic [31:0] hwdata,
  output logic        hready,
  output logic        hresp
);
  logic [31:0] mem [logic [31:0]];
  logic        dphase;
  logic [31:0] daddr;
  int          wait_pct = WAIT_PCT;  // may be changed at run time
  int          waits = 0;
  int          writes = 0;
  bit          stall_now;

  assign hresp = 1'b0;
  assign hready = !stall_now;

  // decide the wait state of the coming cycle on the falling edge
  always @(negedge clk) stall_now = rst_n && dphase && ($urandom_range(0, 99) < wait_pct);

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dphase <= 1'b0;
      daddr  <= '0;
    end else if (hready) begin
      if (dphase) begin
        mem[daddr] = hwdata;
        writes++;
      end
      dphase <= htrans[1] && hwrite && hsize == 3'b010;
      daddr  <= haddr;
    end else begin
      waits++;
    end
  end

  function automatic logic [31:0] read_word(input logic [31:0] a);
    return mem.exists(a) ? mem[a] : 32'hDEAD_BEEF;
  endfunction
endmodule
