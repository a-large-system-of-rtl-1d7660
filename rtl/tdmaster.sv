// tdmaster: the TDMASTER board of a crate.
//
// Two jobs, both from the original description: it holds the threshold-DAC levels of
// the crate's 32 channels, and it reads the data of all 32 channels over
// the auxiliary backplane and hands them to the crate controller, so that the
// crate looks like one board with 32 secondary addresses.
//
// DAC levels: a write (dac_we) stores dac_code as the 12-bit level of channel
// dac_sel; dac_level drives the DACs. Levels reset to 0.
//
// Readout: ro_start, accepted when idle and the crate is in read mode (rw
// high), walks channel 0..N_CH-1 and, per channel, all 2**ADDR_BITS memory
// words, oldest first. Each word is offered on a valid/ready port with its
// channel number (the secondary address) and its position in the buffer.
// A word is taken from the bus and the channel's address stepped on the
// same clock, so with ro_ready held high one word moves per clock. ro_done
// pulses when the last word has been taken. The word order, the handshake
// and the FastBus-free output port are this design's choices: the FastBus
// protocol itself is not described.
module tdmaster
  import td_pkg::*;
#(
  parameter int unsigned N_CH     = 32,
  parameter int unsigned SEL_BITS = 5
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // threshold DAC levels
  input  logic                 dac_we,
  input  logic [SEL_BITS-1:0]  dac_sel,
  input  logic [DAC_BITS-1:0]  dac_code,
  output logic [DAC_BITS-1:0]  dac_level [N_CH],
  // readout control
  input  logic                 rw,          // crate R/W line, 1 = read mode
  input  logic                 ro_start,
  output logic                 ro_busy,
  output logic                 ro_done,
  // auxiliary backplane
  output logic [SEL_BITS-1:0]  aux_sel,
  output logic                 aux_step,
  input  td_word_t             aux_data,
  input  logic                 aux_hit,
  // toward the crate controller
  output logic                 ro_valid,
  input  logic                 ro_ready,
  output logic [SEL_BITS-1:0]  ro_chan,     // secondary address
  output logic [ADDR_BITS-1:0] ro_index,    // word number, 0 = oldest
  output td_word_t             ro_word,
  output logic                 ro_miss      // a word was taken with no board answering
);

  typedef enum logic [0:0] {IDLE, READ} state_t;
  state_t state;

  logic [ADDR_BITS-1:0] idx;
  logic                 last_word, last_chan;

  // DAC level registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < N_CH; c++) dac_level[c] <= '0;
    end else if (dac_we && (32'(dac_sel) < N_CH)) begin
      dac_level[dac_sel] <= dac_code;
    end
  end

  assign aux_step  = (state == READ) && (!ro_valid || ro_ready);
  assign last_word = &idx;
  assign last_chan = (32'(aux_sel) == N_CH - 1);
  assign ro_busy   = (state == READ);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      idx      <= '0;
      aux_sel  <= '0;
      ro_valid <= 1'b0;
      ro_chan  <= '0;
      ro_index <= '0;
      ro_word  <= '0;
      ro_done  <= 1'b0;
      ro_miss  <= 1'b0;
    end else begin
      ro_done <= 1'b0;
      if (ro_valid && ro_ready) ro_valid <= 1'b0;
      unique case (state)
        IDLE: begin
          if (ro_start && rw) begin
            state   <= READ;
            idx     <= '0;
            aux_sel <= '0;
            ro_miss <= 1'b0;
          end
        end
        READ: begin
          if (aux_step) begin
            ro_valid <= 1'b1;
            ro_word  <= aux_data;
            ro_chan  <= aux_sel;
            ro_index <= idx;
            if (!aux_hit) ro_miss <= 1'b1;
            idx      <= idx + 1'b1;
            if (last_word) begin
              if (last_chan) begin
                state   <= IDLE;
                ro_done <= 1'b1;
              end else begin
                aux_sel <= aux_sel + 1'b1;
              end
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  a_no_lost_word: assert property (@(posedge clk) disable iff (!rst_n)
      ro_valid && !ro_ready |=> ro_valid && $stable(ro_word))
    else $error("readout word dropped before it was taken");

endmodule
