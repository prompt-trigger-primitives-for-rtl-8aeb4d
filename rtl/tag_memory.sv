// tag_memory: programmable memory of interesting coincidences.
//
// The address is the concatenation of two 8-bit cluster positions (an inner
// and an outer cluster), 2^16 entries in all. An entry holds a valid bit and
// an 11-bit tag; a valid entry means that this cluster pair is a coincidence
// of interest (a stiff track), and the tag names it uniquely for the
// off-detector system. Only a small subset of the addresses is expected to
// hold tags.
//
// After reset the memory clears itself, one entry per clock, and raises
// init_done when all entries are invalid (2^ADDR_W clocks); writes are
// ignored until then. The write port then loads tags one entry per clock.
// N_RD read ports read combinationally.
//
// Interface: wr_en/wr_addr/wr_data write port; rd_addr/rd_data read ports.
// The address layout and sizes follow the design description; the valid
// bit, the self-clearing after reset and the read-port count are this
// design's choices.
module tag_memory
  import sstt_pkg::*;
#(
  parameter int unsigned ADDR_W = MEM_ADDR_W,
  parameter int unsigned N_RD   = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              init_done,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  tag_entry_t        wr_data,
  input  logic [ADDR_W-1:0] rd_addr [N_RD],
  output tag_entry_t        rd_data [N_RD]
);

  tag_entry_t mem [2**ADDR_W];

  logic [ADDR_W-1:0] clr_addr;
  logic              clearing;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clr_addr  <= '0;
      clearing  <= 1'b1;
      init_done <= 1'b0;
    end else if (clearing) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == '1) begin
        clearing  <= 1'b0;
        init_done <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (clearing)   mem[clr_addr] <= '0;
    else if (wr_en) mem[wr_addr]  <= wr_data;
  end

  always_comb begin
    for (int p = 0; p < int'(N_RD); p++) rd_data[p] = mem[rd_addr[p]];
  end

endmodule
