// fx3_model: behavioural model of the FX3 USB controller's synchronous slave
// FIFO as seen from the FPGA. Not synthesizable; used by testbenches only.
//
// Host-to-FPGA: `host_send` cuts the host's words into DMA buffers of up to
// BUF_WORDS words and hands them alternately to GPIF socket 3 (flags C/D,
// address 2'b11) and socket 1 (flags E/F, address 2'b01), starting with
// socket 3. The ready flag (C/E) is high while the socket has a buffer; the
// watermark flag (D/F) is high while the addressed socket's current buffer
// still has words. When a buffer runs empty both flags of that socket stay
// low until SLRD# has been high for a clock, so one read burst never runs
// into the next buffer. Read data appears RD_LAT clocks after the clock in
// which SLRD# was low; reading an empty or unaddressed socket counts an error.
//
// FPGA-to-host: socket 0 (address 2'b00). Flag A (buffer ready) follows
// `p2u_ready`, flag B (room) is always high. Words written with SLWR# low are
// collected; PKTEND# low commits the packet, which is counted.
//
// Inputs are sampled just before each rising clock edge and the model's state
// and outputs change 1 ns after it, like a registered device.
module fx3_model #(
  parameter int unsigned BUF_WORDS = 128,
  parameter int unsigned RD_LAT    = 2
) (
  input  logic        clk,
  output logic        flag_a,
  output logic        flag_b,
  output logic        flag_c,
  output logic        flag_d,
  output logic        flag_e,
  output logic        flag_f,
  input  logic        slcs_n,
  input  logic        slrd_n,
  input  logic        sloe_n,
  input  logic        slwr_n,
  input  logic        pktend_n,
  input  logic [1:0]  addr,
  output logic [31:0] dq_to_fpga,
  input  logic [31:0] dq_from_fpga,
  input  logic        dq_oe
);
  logic [31:0] s3_words [$], s1_words [$];
  int          s3_lens  [$], s1_lens  [$];
  bit          s3_hold = 0, s1_hold = 0;
  bit          next_is_s3 = 1;
  logic [31:0] rd_pipe [RD_LAT];
  logic [31:0] cur_pkt [$];

  // statistics and received data, read by testbenches
  logic [31:0] rx_words [$];
  int          rx_pkts = 0;
  int          reads_s3 = 0, reads_s1 = 0, bufs_s3 = 0, bufs_s1 = 0;
  int          errors = 0;
  int          s3_lens_done = 0, s1_lens_done = 0;
  bit          p2u_ready = 1;

  initial foreach (rd_pipe[i]) rd_pipe[i] = '0;

  always_comb begin
    flag_c     = (s3_lens.size() > 0) && !s3_hold;
    flag_e     = (s1_lens.size() > 0) && !s1_hold;
    flag_d     = flag_c && (addr == 2'b11);
    flag_f     = flag_e && (addr == 2'b01);
    flag_a     = p2u_ready;
    flag_b     = 1'b1;
    dq_to_fpga = rd_pipe[RD_LAT-1];
  end

  task automatic host_send(input logic [31:0] w []);
    int i = 0;
    while (i < w.size()) begin
      int n = (w.size() - i > int'(BUF_WORDS)) ? int'(BUF_WORDS) : w.size() - i;
      for (int k = 0; k < n; k++) begin
        if (next_is_s3) s3_words.push_back(w[i+k]);
        else            s1_words.push_back(w[i+k]);
      end
      if (next_is_s3) s3_lens.push_back(n); else s1_lens.push_back(n);
      next_is_s3 = !next_is_s3;
      i += n;
    end
  endtask

  function automatic int pending_words();
    return s3_words.size() + s1_words.size();
  endfunction

  initial begin
    bit r, w, e, cs;
    logic [1:0] a;
    logic [31:0] d;
    forever begin
      @(negedge clk);
      #4;
      r = !slrd_n; w = !slwr_n; e = !pktend_n; a = addr; d = dq_from_fpga; cs = !slcs_n;
      @(posedge clk);
      #1;
      for (int i = RD_LAT - 1; i > 0; i--) rd_pipe[i] = rd_pipe[i-1];
      rd_pipe[0] = '0;
      if (!r) begin
        s3_hold = 0;
        s1_hold = 0;
      end
      if (r) begin
        if (!cs || sloe_n) errors++;
        if (a == 2'b11 && s3_lens.size() > 0 && !s3_hold) begin
          rd_pipe[0] = s3_words.pop_front();
          reads_s3++;
          s3_lens[0]--;
          if (s3_lens[0] == 0) begin
            void'(s3_lens.pop_front());
            s3_hold = 1;
            bufs_s3++;
          end
        end else if (a == 2'b01 && s1_lens.size() > 0 && !s1_hold) begin
          rd_pipe[0] = s1_words.pop_front();
          reads_s1++;
          s1_lens[0]--;
          if (s1_lens[0] == 0) begin
            void'(s1_lens.pop_front());
            s1_hold = 1;
            bufs_s1++;
          end
        end else begin
          errors++;
        end
      end
      if (w) begin
        if (a != 2'b00 || !cs) errors++;
        cur_pkt.push_back(d);
        if (e) begin
          foreach (cur_pkt[i]) rx_words.push_back(cur_pkt[i]);
          cur_pkt.delete();
          rx_pkts++;
        end
      end
    end
  end

endmodule
