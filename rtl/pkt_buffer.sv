// pkt_buffer: packet buffers of one packet processing unit.
//
// NUM_BUF buffers of BUF_WORDS 64-bit words are used as a ring. Packets from
// the flow classifier fill the next free buffer; completed packets queue for
// the processor in arrival order. The oldest queued packet is the current
// packet: the processor reaches it through the core port at a fixed window
// (the PPU maps it to a static address), so a program never needs to know
// which physical buffer holds it. When the program is done it forwards the
// packet (it is sent to the output and the buffer freed), drops it, or asks
// for a copy to be sent while it keeps the packet (multicast). drop_cur is the
// same drop, raised by the security monitor; it also cancels copies of the
// packet not yet started. flush discards every packet that
// is queued or being processed, as the I/O monitor requires; packets being
// received or already forwarded are not affected. Packets leave in the order
// they were processed; a dropped buffer is freed when the output pointer
// passes it.
//
// Word 0 of each buffer is the header word written by the flow classifier.
// Byte k of a word (k = 0 first, network order) is bits [63-8k -: 8]; core
// byte enable c_be[k] selects it. Core reads return data one cycle after
// c_re. Packets longer than BUF_WORDS are truncated.
//
// Following the design description: per-PPU packet buffers, processing from a
// static address window, dropping the current packet on a monitor alarm and
// flushing on an I/O monitor alarm. Own choices: the ring organisation, the
// number and size of buffers, the copy command and the stream handshake
// (valid/ready, sop/eop).
module pkt_buffer #(
  parameter int unsigned NUM_BUF   = 4,
  parameter int unsigned BUF_WORDS = 256   // 2 KiB: one 1512-byte packet + header
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // input stream
  input  logic                         in_valid,
  input  logic [63:0]                  in_data,
  input  logic                         in_sop,
  input  logic                         in_eop,
  output logic                         in_ready,
  // core port (current packet)
  output logic                         cur_avail,
  output logic [$clog2(BUF_WORDS):0]   cur_len,
  input  logic [$clog2(BUF_WORDS)-1:0] c_addr,
  input  logic                         c_re,
  input  logic                         c_we,
  input  logic [7:0]                   c_be,
  input  logic [63:0]                  c_wdata,
  output logic [63:0]                  c_rdata,
  input  logic                         c_forward,
  input  logic                         c_drop,
  input  logic                         c_copy,
  input  logic                         drop_cur,
  input  logic                         flush,
  // output stream
  output logic                         out_valid,
  output logic [63:0]                  out_data,
  output logic                         out_sop,
  output logic                         out_eop,
  input  logic                         out_ready,
  // statistics
  output logic [15:0]                  fwd_count,
  output logic [15:0]                  drop_count
);

  localparam int unsigned BW = $clog2(NUM_BUF);
  localparam int unsigned WW = $clog2(BUF_WORDS);
  localparam logic [WW:0]  MAXW = BUF_WORDS[WW:0];

  typedef enum logic [2:0] {B_FREE, B_FILL, B_QUEUED, B_FWD, B_DROP} buf_state_e;

  logic [63:0]     mem [NUM_BUF * BUF_WORDS];
  buf_state_e      state [NUM_BUF];
  logic [WW:0]     len   [NUM_BUF];

  logic [BW-1:0]   wr_ptr, proc_ptr, out_ptr;
  logic            filling;
  logic [WW:0]     wcnt;

  logic            sending, freeing;
  logic [3:0]      copies [NUM_BUF];   // copies still to be sent
  logic [WW:0]     ocnt;

  function automatic int unsigned loc(logic [BW-1:0] b, logic [WW-1:0] w);
    return int'(b) * BUF_WORDS + int'(w);
  endfunction

  // ---- input side --------------------------------------------------------
  assign in_ready = filling || (state[wr_ptr] == B_FREE);
  logic in_fire;
  assign in_fire  = in_valid && in_ready && (filling || in_sop);

  // ---- core side ---------------------------------------------------------
  assign cur_avail = (state[proc_ptr] == B_QUEUED);
  assign cur_len   = len[proc_ptr];
  logic do_drop, do_fwd;
  assign do_drop = cur_avail && (c_drop || drop_cur) && !flush;
  assign do_fwd  = cur_avail && c_forward && !do_drop && !flush;

  // ---- output side -------------------------------------------------------
  logic out_fire;
  assign out_valid = sending;
  assign out_data  = mem[loc(out_ptr, ocnt[WW-1:0])];
  assign out_sop   = sending && (ocnt == '0);
  assign out_eop   = sending && (ocnt == len[out_ptr] - 1'b1);
  assign out_fire  = sending && out_ready;

  // start sending a requested copy of the buffer at the output pointer
  logic copy_start;
  assign copy_start = !sending && copies[out_ptr] != '0
                   && state[out_ptr] inside {B_QUEUED, B_FWD, B_DROP}
                   && !(drop_cur && cur_avail && out_ptr == proc_ptr);

  always_ff @(posedge clk) begin
    if (in_fire && wcnt < MAXW)
      mem[loc(wr_ptr, wcnt[WW-1:0])] <= in_data;
    if (c_we && cur_avail)
      for (int k = 0; k < 8; k++)
        if (c_be[k]) mem[loc(proc_ptr, c_addr)][63-8*k -: 8] <= c_wdata[63-8*k -: 8];
    if (c_re) c_rdata <= mem[loc(proc_ptr, c_addr)];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int b = 0; b < NUM_BUF; b++) begin
        state[b]  <= B_FREE;
        len[b]    <= '0;
        copies[b] <= '0;
      end
      wr_ptr       <= '0;
      proc_ptr     <= '0;
      out_ptr      <= '0;
      filling      <= 1'b0;
      wcnt         <= '0;
      sending      <= 1'b0;
      freeing      <= 1'b0;
      ocnt         <= '0;
      fwd_count    <= '0;
      drop_count   <= '0;
    end else begin
      // input
      if (in_fire) begin
        if (!filling) begin
          state[wr_ptr]  <= B_FILL;
          copies[wr_ptr] <= '0;
        end
        filling <= !in_eop;
        if (wcnt < MAXW) wcnt <= wcnt + 1'b1;
        if (in_eop) begin
          state[wr_ptr] <= B_QUEUED;
          len[wr_ptr]   <= (wcnt < MAXW) ? wcnt + 1'b1 : MAXW;
          wr_ptr        <= wr_ptr + 1'b1;
          wcnt          <= '0;
        end
      end
      // core
      if (do_drop) begin
        state[proc_ptr] <= B_DROP;
        proc_ptr        <= proc_ptr + 1'b1;
      end else if (do_fwd) begin
        state[proc_ptr] <= B_FWD;
        proc_ptr        <= proc_ptr + 1'b1;
      end
      if (flush) begin
        for (int b = 0; b < NUM_BUF; b++)
          if (state[b] == B_QUEUED) state[b] <= B_DROP;
        // a buffer that completes this very cycle is kept
        proc_ptr     <= wr_ptr;
      end
      // copy requests: counted per buffer, sent when the output reaches it
      begin
        logic inc, dec;
        inc = c_copy && cur_avail && !flush && copies[proc_ptr] != '1;
        dec = copy_start;
        if (drop_cur && cur_avail && !flush) begin
          // a monitor drop cancels the copies the attacked program asked for
          copies[proc_ptr] <= '0;
          if (dec && out_ptr != proc_ptr) copies[out_ptr] <= copies[out_ptr] - 1'b1;
        end else if (inc && dec && proc_ptr == out_ptr) ;
        else begin
          if (inc) copies[proc_ptr] <= copies[proc_ptr] + 1'b1;
          if (dec) copies[out_ptr]  <= copies[out_ptr] - 1'b1;
        end
      end
      // output
      if (!sending) begin
        if (copy_start) begin
          // copies requested by the program go out first, buffer kept
          sending <= 1'b1;
          freeing <= 1'b0;
          ocnt    <= '0;
        end else if (state[out_ptr] == B_DROP) begin
          state[out_ptr] <= B_FREE;
          out_ptr        <= out_ptr + 1'b1;
          drop_count     <= drop_count + 1'b1;
        end else if (state[out_ptr] == B_FWD) begin
          sending <= 1'b1;
          freeing <= 1'b1;
          ocnt    <= '0;
        end
      end else if (out_fire) begin
        ocnt <= ocnt + 1'b1;
        if (out_eop) begin
          sending <= 1'b0;
          if (freeing) begin
            state[out_ptr] <= B_FREE;
            out_ptr        <= out_ptr + 1'b1;
            fwd_count      <= fwd_count + 1'b1;
          end
        end
      end
    end
  end

  // A packet starts with sop; a new packet is accepted only into a free buffer.
  always_ff @(posedge clk)
    if (rst_n && in_valid && in_ready && !filling)
      a_sop_first: assert (in_sop) else $error("packet does not start with sop");

endmodule
