// msg_mem: message memory of the decoder, two banks (L and R) of WORDS
// registers each, all read and written in parallel.
//
// In polar mode word s*N + j of the L bank holds the right-to-left message
// L(s+1, j+1) of the factor graph and the R bank holds the left-to-right
// message R(s+1, j+1). In LDPC mode the same registers are reused: L words
// 0..23 hold the variable-to-check messages of the 24 edges and R words 0..11
// hold the channel LLRs of the 12 code bits.
//
// Loading a frame takes no extra cycle: while load is high the read ports
// show the init_* images instead of the stored words, so the datapath can
// already compute the first step, and at the clock edge every word takes its
// write data if its write enable is set, or its init image otherwise. Words
// with neither keep their value. Reset clears all words.
//
// The source shows the memories only as boxes; the organisation as
// registers, the reuse between modes and the load bypass are this
// implementation's choices.
module msg_mem #(
  parameter int W     = bp_pkg::LLR_W,
  parameter int WORDS = bp_pkg::POLAR_WORDS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic signed [W-1:0] init_l [WORDS],
  input  logic signed [W-1:0] init_r [WORDS],
  input  logic [WORDS-1:0]    we_l,
  input  logic signed [W-1:0] wd_l   [WORDS],
  input  logic [WORDS-1:0]    we_r,
  input  logic signed [W-1:0] wd_r   [WORDS],
  output logic signed [W-1:0] rd_l   [WORDS],
  output logic signed [W-1:0] rd_r   [WORDS]
);
  logic signed [W-1:0] mem_l [WORDS];
  logic signed [W-1:0] mem_r [WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int w = 0; w < WORDS; w++) begin
        mem_l[w] <= '0;
        mem_r[w] <= '0;
      end
    end else begin
      for (int w = 0; w < WORDS; w++) begin
        if (we_l[w])   mem_l[w] <= wd_l[w];
        else if (load) mem_l[w] <= init_l[w];
        if (we_r[w])   mem_r[w] <= wd_r[w];
        else if (load) mem_r[w] <= init_r[w];
      end
    end
  end

  always_comb begin
    for (int w = 0; w < WORDS; w++) begin
      rd_l[w] = load ? init_l[w] : mem_l[w];
      rd_r[w] = load ? init_r[w] : mem_r[w];
    end
  end
endmodule
