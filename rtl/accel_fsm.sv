// accel_fsm: control state machine of one accelerator operation.
//
// On start it runs the steps in order:
//   INIT  - one cycle: both subsets are filled with their fill values and
//           the loader's address counter and statistics are cleared;
//   READ  - the HP master streams the set from DDR memory and the loader
//           forms blocks of admitted items. In subset mode the sorter merges
//           the blocks and the state ends when it reports the merge of the
//           final block. In copy mode the FSM itself takes each block: it
//           has the HP master write the block's items to the result area,
//           right after the items already written (copied counts them),
//           accepts the block (copy_accept) when the write is complete, and
//           ends after the final block. An empty set skips READ.
//   WRITE - subset mode only: the HP master writes the Lmax largest and
//           Lmin smallest items back to DDR memory and waits for all write
//           responses;
//   DONE  - one cycle: done pulses, which sets the interrupt to the
//           processor, and the FSM returns to IDLE.
// busy is high from INIT to DONE, and cycles counts the clock cycles in
// which busy was high, kept until the next start.
//
// The order of the steps and the two uses of the filtered items (subsets,
// or written back to memory) follow the document; the states, the block-
// by-block copy and the cycle counter are this design's own.
module accel_fsm (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        copy,         // write filtered items back, no subsets
  input  logic [31:0] n_words,
  output logic        init,         // clear subsets and loader
  output logic        rd_start,
  input  logic        merged_last,  // the sorter finished the final block
  input  logic        blk_valid,    // copy mode: block offered by the loader
  input  logic [31:0] blk_count,
  input  logic        blk_last,
  output logic        copy_accept,  // copy mode: block written, release it
  output logic [31:0] copied,       // copy mode: words written so far
  output logic        wr_start,
  input  logic        wr_done,
  output logic        busy,
  output logic        done,
  output logic [31:0] cycles
);

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_READ, S_WRITE, S_DONE} state_t;
  state_t state_q;
  logic   writing_q;     // copy mode: a block write is in flight
  logic   copy_start;    // copy mode: start writing the offered block

  always_comb begin
    copy_start  = (state_q == S_READ) && copy && blk_valid && !writing_q && blk_count != 0;
    copy_accept = (state_q == S_READ) && copy && blk_valid &&
                  ((writing_q && wr_done) || (!writing_q && blk_count == 0));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      cycles    <= '0;
      writing_q <= 1'b0;
      copied    <= '0;
    end else begin
      unique case (state_q)
        S_IDLE:  if (start) begin
          state_q <= S_INIT;
          cycles  <= '0;
          copied  <= '0;
        end
        S_INIT:  state_q <= (n_words != 0) ? S_READ : (copy ? S_DONE : S_WRITE);
        S_READ: begin
          if (copy_start) writing_q <= 1'b1;
          if (copy_accept) begin
            writing_q <= 1'b0;
            copied    <= copied + blk_count;
            if (blk_last) state_q <= S_DONE;
          end
          if (!copy && merged_last) state_q <= S_WRITE;
        end
        S_WRITE: if (wr_done) state_q <= S_DONE;
        S_DONE:  state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
      if (state_q != S_IDLE) cycles <= cycles + 32'd1;
    end
  end

  always_comb begin
    init     = (state_q == S_INIT);
    rd_start = (state_q == S_INIT) && (n_words != 0);
    wr_start = (state_q == S_READ && !copy && merged_last) ||
               (state_q == S_INIT && n_words == 0 && !copy) ||
               copy_start;
    busy     = (state_q != S_IDLE);
    done     = (state_q == S_DONE);
  end

endmodule
