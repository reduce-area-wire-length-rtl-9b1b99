// Address half register of the modified RAM (the 4-bit row register and the
// 4-bit column register).
//
// The RAM has one narrow address bus that carries the row half and the column
// half of an address one after the other. Each half is held in a register of
// its own: on a rising clock edge with `load` high (RAS for the row register,
// CAS for the column register) the register captures `d`; otherwise it keeps
// its value, so the decoder behind it sees a stable half-address while the
// bus moves on to the other half.
//
// Timing: `q` changes one clock after `load` is sampled high. Asynchronous
// active-low reset clears it to 0. The two registers and their 4-bit width
// follow the design description; the clock edge, the active-high strobe and
// the reset are this design's choices.
module addr_reg #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,   // RAS or CAS strobe
  input  logic [W-1:0] d,      // multiplexed address bus
  output logic [W-1:0] q       // held address half
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (load) q <= d;
  end

endmodule
