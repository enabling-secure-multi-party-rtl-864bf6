// key_setup: generation and ring exchange of a party's PRF keys.
//
// After reset the party draws four consecutive 32-bit words from its RNG and
// concatenates them (first word in bits [127:96]) into its 128-bit key K_i.
// It keeps K_i and sends it once, as a one-cycle key_out_valid pulse, to the
// neighbouring party; all parties send in the same direction around the ring,
// so each party also receives exactly one key, K_(i+1), on key_in_valid, which
// may arrive before or after its own key is ready. keys_ready rises once both
// keys are held and stays high. The four-word concatenation and the one-way key
// passing follow the document; the pulse signalling is this design's own.
//
// Timing: rng_en is high for the first 4 cycles after reset; key_out_valid
// pulses right after the 4th clock edge; keys_ready rises one cycle after the
// neighbour key is captured, and no earlier than 6 cycles after reset.
module key_setup (
  input  logic         clk,
  input  logic         rst_n,
  // RNG stream
  output logic         rng_en,
  input  logic [31:0]  rng_word,
  // key sent to the neighbour, key received from the other neighbour
  output logic         key_out_valid,
  output logic [127:0] key_out,
  input  logic         key_in_valid,
  input  logic [127:0] key_in,
  // keys held
  output logic [127:0] key_own,
  output logic [127:0] key_nbr,
  output logic         keys_ready
);
  typedef enum logic [1:0] {S_GATHER, S_SEND, S_WAIT, S_READY} state_e;

  state_e      state;
  logic [1:0]  nword;
  logic        nbr_valid;

  assign rng_en  = (state == S_GATHER);
  assign key_out = key_own;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_GATHER;
      nword         <= '0;
      key_own       <= '0;
      key_nbr       <= '0;
      nbr_valid     <= 1'b0;
      key_out_valid <= 1'b0;
      keys_ready    <= 1'b0;
    end else begin
      key_out_valid <= 1'b0;
      if (key_in_valid) begin
        key_nbr   <= key_in;
        nbr_valid <= 1'b1;
      end
      unique case (state)
        S_GATHER: begin
          key_own <= {key_own[95:0], rng_word};
          nword   <= nword + 1'b1;
          if (nword == 2'd3) begin
            state         <= S_SEND;
            key_out_valid <= 1'b1;
          end
        end
        S_SEND:  state <= S_WAIT;
        S_WAIT: if (nbr_valid) begin
          state      <= S_READY;
          keys_ready <= 1'b1;
        end
        S_READY: ;
      endcase
    end
  end

  a_one_key: assert property (@(posedge clk) disable iff (!rst_n) key_in_valid |-> !nbr_valid);
endmodule
