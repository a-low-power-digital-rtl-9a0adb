// shift_reg: the Shift Reg block, DEPTH words of W bits shifted one place per clock.
//
// Holds the state variable of every pipelined calcium unit. Each rising clock edge the word
// at d enters stage 0 and every stored word moves one stage on; q is the last stage, the
// unit whose turn it is to be advanced. With the adder between q and d the register forms a
// ring, so each of the DEPTH units is updated once every DEPTH clocks. q_next shows the
// word one stage before the end, so a user can prepare its processing a clock early
// (DEPTH must be at least 2). An asynchronous
// active-low reset loads every stage with INIT (the reset value is this design's choice).
module shift_reg #(
  parameter int unsigned      DEPTH = 16,
  parameter int unsigned      W     = 14,
  parameter logic [W-1:0]     INIT  = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic [W-1:0] q_next, // stage DEPTH-2: the word that becomes q at the next shift
  output logic [W-1:0] head    // stage 0: the word written last
);
  logic [W-1:0] stage [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) stage[i] <= INIT;
    end else if (en) begin
      stage[0] <= d;
      for (int i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  assign q      = stage[DEPTH-1];
  assign q_next = stage[DEPTH-2];
  assign head   = stage[0];
endmodule
