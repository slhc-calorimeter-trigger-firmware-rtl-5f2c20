// tower_input_buffer: frame buffer behind one GTX dual tile.
//
// Each of the two links of a dual tile delivers 8 16-bit words per 25 ns
// bunch crossing. The words are shifted into two banks of 8 16-bit
// registers; when the eighth word has arrived, the 16 words are copied into
// the 16 16-bit output registers that hold the frame for the cluster finder
// until the next frame is complete. Words 0..14 (link 0 words 0..7, link 1
// words 0..6) are tower words, ECAL Et in bits 7:0 and HCAL Et in bits 15:8;
// bits 14:0 of word 15 are the 15 ECAL fine-grain bits, giving 15 x 17 bits
// for 15 towers. The register organisation (2 x 8 then 16 registers, 15
// towers per tile) follows the original design; the word order within the
// frame is this design's choice.
//
// Interface: lane_valid qualifies a word on both lanes, lane_sof marks word 0
// of a frame. frame_valid pulses for one cycle, the cycle after word 7 was
// accepted, with towers/fg valid from then until the next frame_valid.
// The original design clocks the banks at 320 MHz and the output registers at
// 40 MHz; here a single clock with a word strobe is used.
module tower_input_buffer
  import calo_pkg::*;
#(
  parameter int unsigned WORDS_PER_LINK = 8,
  parameter int unsigned N_TOWERS       = 15
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [1:0][15:0]            lane_data,
  input  logic                        lane_valid,
  input  logic                        lane_sof,
  output logic [N_TOWERS-1:0][15:0]   towers,
  output logic [N_TOWERS-1:0]         fg,
  output logic                        frame_valid
);
  localparam int unsigned CW = $clog2(WORDS_PER_LINK);

  logic [1:0][WORDS_PER_LINK-1:0][15:0] bank;
  logic [CW-1:0]                        wcnt;
  logic                                 in_frame;
  logic [2*WORDS_PER_LINK-1:0][15:0]    frame_q;

  // Word index of the present word: 0 on lane_sof, else the running count.
  logic [CW-1:0] widx;
  assign widx = lane_sof ? '0 : wcnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wcnt        <= '0;
      in_frame    <= 1'b0;
      frame_valid <= 1'b0;
    end else begin
      frame_valid <= 1'b0;
      if (lane_valid && (lane_sof || in_frame)) begin
        bank[0][widx] <= lane_data[0];
        bank[1][widx] <= lane_data[1];
        if (widx == CW'(WORDS_PER_LINK-1)) begin
          wcnt        <= '0;
          in_frame    <= 1'b0;
          frame_valid <= 1'b1;
        end else begin
          wcnt     <= widx + 1'b1;
          in_frame <= 1'b1;
        end
      end
    end
  end

  // Output registers: the last word of each lane is written straight in,
  // the others come from the banks.
  always_ff @(posedge clk) begin
    if (lane_valid && (lane_sof || in_frame) && widx == CW'(WORDS_PER_LINK-1)) begin
      for (int w = 0; w < WORDS_PER_LINK - 1; w++) begin
        frame_q[w]                  <= bank[0][w];
        frame_q[WORDS_PER_LINK + w] <= bank[1][w];
      end
      frame_q[WORDS_PER_LINK-1]   <= lane_data[0];
      frame_q[2*WORDS_PER_LINK-1] <= lane_data[1];
    end
  end

  always_comb begin
    for (int t = 0; t < N_TOWERS; t++) begin
      towers[t] = frame_q[t];
      fg[t]     = frame_q[2*WORDS_PER_LINK-1][t];
    end
  end

endmodule
