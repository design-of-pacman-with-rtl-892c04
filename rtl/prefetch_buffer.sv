// prefetch_buffer: fetches microcode ahead of the execution unit and
// performs its single-word data transfers, both through Pacman's AHB
// master.
//
// Instruction words are kept in a DEPTH_WORDS-entry FIFO and handed to the
// execution unit as a byte stream: avail is the number of bytes buffered,
// peek the next five bytes (enough for the longest instruction) and the
// execution unit removes bytes with consume. A start (sop) or a jump
// (redirect) empties the FIFO and restarts fetching at the new address. The
// fetch address is kept 16-byte aligned so that bursts never cross a 1 KB
// boundary: the leading words and bytes before the target are dropped, and
// beats still in flight from before the redirect are discarded.
//
// The controller is the seven-state FSM of the design: S_IDLE until sop;
// S_READY waits for the AHB master to be free and chooses S_1BEAT for a
// pending load/store, S_8BEAT when eight words fit and the fetch address is
// 32-byte aligned, otherwise S_4BEAT when four words fit; those states
// start the transfer and go to S_BUSY. S_BUSY collects read data while reads
// are pending and returns to S_READY at the end of a burst or when load data
// is read; a store goes on to S_WAIT, which returns to S_READY once the
// write transfer is done. A load or store has priority over prefetching.
// stop (END executed) returns the FSM to S_IDLE from S_READY.
//
// The states and their conditions follow the document; the FIFO depth,
// the alignment rule and the stop path are this design's choices. A bus
// error on an instruction fetch is reported on pf_err at once (sticky until
// reset), not when the faulty bytes are reached.
module prefetch_buffer
  import pacman_pkg::*;
#(
  parameter int unsigned DEPTH_WORDS = 8
) (
  input  logic        hclk,
  input  logic        hresetn,
  // control from the execution unit
  input  logic        sop,
  input  logic        redirect,
  input  logic [31:0] target,
  input  logic        stop,
  // byte stream to the execution unit
  output logic [5:0]  avail,
  output logic [39:0] peek,
  input  logic [2:0]  consume,
  output logic        pf_err,
  // single data transfers
  input  logic        mem_valid,
  input  mem_req_t    mem_req,
  output logic        mem_done,
  output logic [31:0] mem_rdata,
  output logic        mem_err,
  // AHB master command interface
  output logic        cmd_valid,
  output logic [31:0] cmd_addr,
  output logic [3:0]  cmd_beats,
  output logic        cmd_write,
  output logic [31:0] cmd_wdata,
  input  logic        cmd_ready,
  input  logic        rvalid,
  input  logic [31:0] rdata,
  input  logic        done,
  input  logic        err
);

  localparam int unsigned PW = $clog2(DEPTH_WORDS);
  localparam int unsigned CW = PW + 1;

  typedef enum logic [2:0] {S_IDLE, S_READY, S_8BEAT, S_4BEAT, S_1BEAT, S_BUSY, S_WAIT} pf_state_e;
  typedef enum logic [1:0] {X_FETCH, X_LOAD, X_STORE} xfer_e;

  pf_state_e st;
  xfer_e     xfer;

  logic [31:0]   words [DEPTH_WORDS];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] count, inflight, discard;
  logic [1:0]    rd_ofs, drop_words;
  logic [31:0]   fetch_addr;
  logic          stop_pend;

  // ---------------- byte stream view ----------------
  logic [63:0] window;
  assign window = {words[PW'(rd_ptr + PW'(1))], words[rd_ptr]};
  assign peek   = 40'(window >> (8 * rd_ofs));
  assign avail  = (count == 0) ? 6'd0 : 6'(count) * 6'd4 - 6'(rd_ofs);

  // free words for a new burst: beats to be discarded take no space
  logic [CW:0] free;
  assign free = (CW+1)'(DEPTH_WORDS) - (CW+1)'(count) - (CW+1)'(inflight) + (CW+1)'(discard);

  logic       flush;
  logic [3:0] pos;
  logic [1:0] pop_words;
  logic       push;
  assign flush     = sop || redirect;
  assign pos       = 4'(rd_ofs) + 4'(consume);
  assign pop_words = flush ? 2'd0 : pos[3:2];
  assign push      = rvalid && xfer == X_FETCH && discard == 0 && drop_words == 0 && !flush;

  always_ff @(posedge hclk) begin
    if (push) words[wr_ptr] <= rdata;
  end

  always_ff @(posedge hclk) begin
    if (!hresetn) begin
      st <= S_IDLE; xfer <= X_FETCH;
      rd_ptr <= '0; wr_ptr <= '0; count <= '0; inflight <= '0; discard <= '0;
      rd_ofs <= '0; drop_words <= '0; fetch_addr <= '0; stop_pend <= 1'b0; pf_err <= 1'b0;
    end else begin
      // -------- FIFO pointers --------
      if (flush) begin
        rd_ptr     <= '0;
        wr_ptr     <= '0;
        count      <= '0;
        rd_ofs     <= target[1:0];
        drop_words <= target[3:2];
        fetch_addr <= {target[31:4], 4'h0};
        discard    <= (rvalid && xfer == X_FETCH) ? inflight - CW'(1) : inflight;
      end else begin
        rd_ptr <= rd_ptr + PW'(pop_words);
        rd_ofs <= pos[1:0];
        if (push) wr_ptr <= wr_ptr + PW'(1);
        count <= count + CW'(push) - CW'(pop_words);
        if (rvalid && xfer == X_FETCH) begin
          if (discard != 0)         discard    <= discard - CW'(1);
          else if (drop_words != 0) drop_words <= drop_words - 2'd1;
        end
      end
      if (rvalid && xfer == X_FETCH) inflight <= inflight - CW'(1);

      if (stop) stop_pend <= 1'b1;
      if (sop)  stop_pend <= 1'b0;

      // -------- controller --------
      unique case (st)
        S_IDLE:  if (sop) st <= S_READY;
        S_READY: begin
          if (stop_pend && !sop) st <= S_IDLE;
          else if (cmd_ready && !flush) begin
            if (mem_valid)                                  st <= S_1BEAT;
            else if (free >= 8 && fetch_addr[4:0] == 5'h0)  st <= S_8BEAT;
            else if (free >= 4)                             st <= S_4BEAT;
          end
        end
        S_8BEAT: begin
          xfer <= X_FETCH; inflight <= CW'(8); st <= S_BUSY;
          if (flush) discard <= CW'(8);
          else       fetch_addr <= fetch_addr + 32'd32;
        end
        S_4BEAT: begin
          xfer <= X_FETCH; inflight <= CW'(4); st <= S_BUSY;
          if (flush) discard <= CW'(4);
          else       fetch_addr <= fetch_addr + 32'd16;
        end
        S_1BEAT: begin
          xfer <= mem_req.write ? X_STORE : X_LOAD; st <= S_BUSY;
        end
        S_BUSY: begin
          if (xfer == X_STORE) st <= S_WAIT;                 // no pending reads
          else if (done) begin
            st <= S_READY;                                   // burst over / load data read
            if (xfer == X_FETCH && err) pf_err <= 1'b1;
          end
        end
        S_WAIT:  if (done) st <= S_READY;                    // write transfer done
        default: st <= S_IDLE;
      endcase
    end
  end

  // command issue in the S_8BEAT / S_4BEAT / S_1BEAT states
  always_comb begin
    cmd_valid = 1'b0;
    cmd_addr  = fetch_addr;
    cmd_beats = 4'd1;
    cmd_write = 1'b0;
    cmd_wdata = mem_req.wdata;
    unique case (st)
      S_8BEAT: begin cmd_valid = 1'b1; cmd_beats = 4'd8; end
      S_4BEAT: begin cmd_valid = 1'b1; cmd_beats = 4'd4; end
      S_1BEAT: begin cmd_valid = 1'b1; cmd_addr = mem_req.addr; cmd_write = mem_req.write; end
      default: ;
    endcase
  end

  assign mem_done  = done && ((st == S_BUSY && xfer == X_LOAD) || st == S_WAIT);
  assign mem_rdata = rdata;
  assign mem_err   = mem_done && err;

endmodule
