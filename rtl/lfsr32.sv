// lfsr32: 32-bit maximal-length linear feedback shift register, XNOR form.
//
// Stages are numbered 1..32 (stage i is q[i-1]). On every enabled clock the
// register shifts from stage 1 towards stage 32 and stage 1 takes
// XNOR(stage 32, stage 22, stage 2, stage 1). These taps give a period of
// 2^32-1; the all-ones word is the lock-up state of the XNOR form and is never
// reached from any other state. The parallel output is the register itself.
// `load` restarts the sequence from SEED (priority over `en`), so every run of the
// generator produces the identical sequence. Taps and XNOR form are those of the
// original design; the seed of zero is this design's choice.
module lfsr32 #(
  parameter logic [31:0] SEED = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst,   // synchronous, loads SEED
  input  logic        load,  // synchronous restart from SEED
  input  logic        en,    // advance one step
  output logic [31:0] q
);

  logic fb;

  always_comb fb = ~(q[31] ^ q[21] ^ q[1] ^ q[0]);

  always_ff @(posedge clk) begin
    if (rst || load) q <= SEED;
    else if (en)     q <= {q[30:0], fb};
  end

endmodule
