// lbc_reg: input register of a data bus, with a valid bit.
//
// The parallel encoder and decoder capture each input bus in a register and
// compute their outputs combinationally from it, so a result appears one
// clock after its input.  When in_valid is high the register loads d and
// out_valid goes high on the next clock; when in_valid is low it keeps its
// word and out_valid goes low.  An asynchronous active-low reset clears data
// and valid.  The valid bit, the load enable and the reset are this design's
// choices.
//
// With REGISTERED = 0 the register is left out: q = d and out_valid =
// in_valid in the same cycle, the zero-clock-delay form of the circuit.
//
// Ports: clk, rst_n, in_valid, d (W bits) in; out_valid, q (W bits) out.
module lbc_reg #(
  parameter int unsigned W          = 8,
  parameter bit          REGISTERED = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] d,
  output logic         out_valid,
  output logic [W-1:0] q
);

  if (REGISTERED) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        q         <= '0;
        out_valid <= 1'b0;
      end else begin
        out_valid <= in_valid;
        if (in_valid) q <= d;
      end
    end
  end else begin : g_wire
    assign q         = d;
    assign out_valid = in_valid;
  end

endmodule
