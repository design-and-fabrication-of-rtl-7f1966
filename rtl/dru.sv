// dru: data routing unit of the PE.
//
// Each PE has two DRUs, one taking data from the north or west neighbour and
// driving the south output, the other taking data from the south or east
// neighbour and driving the north output. The first multiplexer picks the
// shuffling direction (vertical or horizontal, chosen per butterfly stage),
// the second picks between that neighbour word and the PE's own HBA result,
// and the PIPO register Reg.D holds the chosen word for one or more cycles.
// Communication is bit-parallel, one W-bit word per clock.
//
// Timing: q changes on the rising clock edge at which ld is high; it holds
// otherwise. Reset clears the register. The mux structure and the register
// follow the document; the reset and the select encodings are this design's.
module dru #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] v_in,     // vertical neighbour (NI or SI)
  input  logic [W-1:0] h_in,     // horizontal neighbour (WI or EI)
  input  logic [W-1:0] res_in,   // own HBA result
  input  logic         horiz,    // 1: take h_in
  input  logic         src_res,  // 1: take res_in
  input  logic         ld,       // load Reg.D
  output logic [W-1:0] q         // Reg.D
);
  logic [W-1:0] shuf, d;

  always_comb begin
    shuf = horiz ? h_in : v_in;
    d    = src_res ? res_in : shuf;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (ld) q <= d;
  end
endmodule
