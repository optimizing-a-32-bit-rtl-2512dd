// bdt_block: register sequencer of LDM/STM.
//
// A 16-bit list register holds the registers still to transfer.  The list in
// use is the instruction's register_list when reglist_mux_en is low, else the
// list register.  A chain of sixteen 4-bit 2:1 muxes (highest register first,
// lowest last, so the lowest set bit wins) gives the index of the next
// register, bdt_register_source.  A 4-to-16 decoder turns it back into a mask
// that removes the register from the list; when advance is high the reduced
// list is stored.  bdt_done is high when the reduced list is empty, that is,
// when the register now selected is the last.  bdt_done_latched is bdt_done
// of the previous cycle.  bdt_register_dest is the source index delayed by one
// transfer, the register a load writes one cycle after its data arrives.
// The mux chain, decoder, list feedback and the two done outputs follow the
// block diagram; the two-phase latch chain is one flip-flop per stage here.
module bdt_block (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] register_list,
  input  logic        reglist_mux_en,
  input  logic        advance,
  output logic [3:0]  bdt_register_source,
  output logic [3:0]  bdt_register_dest,
  output logic        bdt_done,
  output logic        bdt_done_latched
);
  logic [15:0] list_q, list_sel, dec, list_next;
  logic [3:0]  pri [17];

  always_comb begin
    list_sel = reglist_mux_en ? list_q : register_list;
    // mux chain: start with 1111 and let each lower set bit override
    pri[16] = 4'hF;
    for (int i = 15; i >= 0; i--)
      pri[i] = list_sel[i] ? 4'(i) : pri[i+1];
    bdt_register_source = pri[0];
    dec = 16'h0001 << bdt_register_source;
    list_next = list_sel ^ (list_sel & dec);
    bdt_done  = (list_next == 16'h0000);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      list_q            <= '0;
      bdt_register_dest <= '0;
      bdt_done_latched  <= 1'b0;
    end else begin
      list_q           <= advance ? list_next : list_sel;
      bdt_done_latched <= bdt_done;
      if (advance) bdt_register_dest <= bdt_register_source;
    end
  end
endmodule
