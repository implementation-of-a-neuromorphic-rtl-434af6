// danna_element: one programmable DANNA element, acting as a neuron or as a
// synapse.
//
// Every element has 16 input ports (from the 8 nearest neighbours and the 8
// elements two steps away in the same directions) and one broadcast output
// (a fire bit and an 8-bit value). During a network cycle it samples one port
// per AFC slot, in the global order given by `sel`, and only if that port is
// enabled in its Input Enable register.
//
//  Neuron:  each sampled fire adds the sender's value to a saturating 16-bit
//           accumulator; after each addition the charge is compared with the
//           threshold and a crossing is remembered. At the end of the network
//           cycle (gnc_tick) the neuron fires if the charge exceeded the
//           threshold, unless it fired in the previous cycle (one-cycle
//           refractory period, during which it still accumulates). Firing
//           resets the charge to the bias level (0) and drives the threshold
//           value on the output.
//  Synapse: a sampled fire from its input neuron is pushed into the distance
//           FIFO, a 16-bit shift register that moves once per network cycle;
//           an event sampled in cycle j fires the synapse output, carrying the
//           current weight, in cycle j+distance (distance 0 acts as 1). The
//           port named by Output Select is watched: if that neuron fires in
//           the cycle after the synapse fired, the weight rises by one (LTP);
//           if it fires otherwise, the weight falls by one (LTD). After either,
//           the weight is frozen for the programmed LTP/LTD refractory period
//           (in network cycles). The weight saturates at -128 and +127.
//
// Monitoring: `capture` loads a 32-bit shift register with {accumulator
// value (16 bits), fires since the last capture (8 bits, saturating), events
// held in the distance FIFO (8 bits)}; `shift` moves it one bit towards
// `mon_out` (MSB first) and takes `mon_in` at the LSB, so the elements of a
// column form one chain.
//
// Programming: a load whose `load_addr` equals this element's `my_addr`
// writes the configuration; `clear` (the reset command) erases configuration
// and state. Neither the bias value, the LTP/LTD step nor the register widths
// are fixed by the reference description; bias 0, step 1, a 4-bit distance
// and the monitor field split are this design's choices.
//
// Timing: outputs change only on gnc_tick of a cycle in which `adv` is high;
// they hold for the whole next network cycle, which makes the array behave
// like a synchronous network regardless of the sampling order.
module danna_element
  import danna_pkg::*;
#(
  parameter logic signed [ACC_W-1:0] BIAS = '0
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               clear,
  // array timing
  input  logic                               adv,          // this network cycle executes
  input  logic                               sample_tick,
  input  logic                               acc_tick,
  input  logic                               gnc_tick,
  input  logic [SEL_W-1:0]                   sel,
  // programming
  input  logic [15:0]                        my_addr,
  input  logic                               load_en,
  input  logic [15:0]                        load_addr,
  input  elem_cfg_t                          load_cfg,
  // monitoring
  input  logic                               capture,
  input  logic                               shift,
  input  logic                               mon_in,
  output logic                               mon_out,
  // network
  input  logic [NPORTS-1:0]                  in_fire,
  input  logic [NPORTS-1:0][WEIGHT_W-1:0]    in_w,
  output logic                               fire_out,
  output logic [WEIGHT_W-1:0]                w_out
);
  localparam logic signed [ACC_W-1:0] ACC_MAX = {1'b0, {(ACC_W-1){1'b1}}};
  localparam logic signed [ACC_W-1:0] ACC_MIN = {1'b1, {(ACC_W-1){1'b0}}};

  elem_cfg_t cfg;

  logic                        lat_fire;     // latched fire of the sampled port
  logic [WEIGHT_W-1:0]         lat_w;        // latched value of the sampled port
  logic signed [ACC_W-1:0]     charge;       // neuron charge
  logic                        crossed;      // threshold exceeded in this cycle
  logic                        refrac;       // neuron fired last cycle
  logic                        got_in;       // synapse saw its input fire
  logic [15:0]                 dist_sr;      // synapse distance FIFO
  logic                        fired_prev;   // synapse output fired last cycle
  logic [7:0]                  ltp_cnt;      // LTP/LTD refractory counter
  logic signed [WEIGHT_W-1:0]  weight;       // synapse weight
  logic [7:0]                  fire_cnt;
  logic [MON_W-1:0]            mon_sr;

  // ---- combinational helpers ------------------------------------------
  logic signed [ACC_W-1:0] thr_ext;
  logic signed [ACC_W:0]   sum_wide;
  logic signed [ACC_W-1:0] sum_sat;
  logic [3:0]              dly_idx;
  logic [15:0]             sr_next;
  logic                    syn_fire;
  logic                    out_fired;
  logic [7:0]              stored;

  always_comb begin
    thr_ext  = ACC_W'($signed(cfg.thr_weight));
    sum_wide = {charge[ACC_W-1], charge} + (ACC_W+1)'($signed(lat_w));
    if (sum_wide > (ACC_W+1)'(ACC_MAX))      sum_sat = ACC_MAX;
    else if (sum_wide < (ACC_W+1)'(ACC_MIN)) sum_sat = ACC_MIN;
    else                                     sum_sat = sum_wide[ACC_W-1:0];

    dly_idx   = (cfg.distance == '0) ? 4'd0 : cfg.distance - 4'd1;
    sr_next   = {dist_sr[14:0], got_in};
    syn_fire  = sr_next[dly_idx];
    out_fired = in_fire[cfg.out_sel];

    // Events still travelling through the distance FIFO.
    stored = '0;
    for (int i = 0; i < 16; i++)
      if (i < int'(dly_idx) && dist_sr[i]) stored = stored + 8'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg        <= '0;
      lat_fire   <= 1'b0;
      lat_w      <= '0;
      charge     <= BIAS;
      crossed    <= 1'b0;
      refrac     <= 1'b0;
      got_in     <= 1'b0;
      dist_sr    <= '0;
      fired_prev <= 1'b0;
      ltp_cnt    <= '0;
      weight     <= '0;
      fire_cnt   <= '0;
      mon_sr     <= '0;
      fire_out   <= 1'b0;
      w_out      <= '0;
    end else if (clear) begin
      cfg        <= '0;
      lat_fire   <= 1'b0;
      lat_w      <= '0;
      charge     <= BIAS;
      crossed    <= 1'b0;
      refrac     <= 1'b0;
      got_in     <= 1'b0;
      dist_sr    <= '0;
      fired_prev <= 1'b0;
      ltp_cnt    <= '0;
      weight     <= '0;
      fire_cnt   <= '0;
      mon_sr     <= '0;
      fire_out   <= 1'b0;
      w_out      <= '0;
    end else begin
      // ---- programming -------------------------------------------------
      if (load_en && load_addr == my_addr) begin
        cfg    <= load_cfg;
        weight <= load_cfg.thr_weight;
      end

      // ---- monitoring --------------------------------------------------
      if (capture) begin
        mon_sr   <= {(cfg.is_synapse ? ACC_W'(weight) : charge), fire_cnt, stored};
        fire_cnt <= '0;
      end else if (shift) begin
        mon_sr <= {mon_sr[MON_W-2:0], mon_in};
      end

      if (adv) begin
        // ---- acquire fire (AFC) ---------------------------------------
        if (sample_tick) begin
          lat_fire <= in_fire[sel] & cfg.in_en[sel];
          lat_w    <= in_w[sel];
        end

        // ---- accumulate (AC inside AEC) --------------------------------
        if (acc_tick && lat_fire) begin
          if (cfg.is_synapse) begin
            got_in <= 1'b1;
          end else begin
            charge <= sum_sat;
            if (sum_sat > thr_ext) crossed <= 1'b1;
          end
        end

        // ---- close the network cycle (GNC) -----------------------------
        if (gnc_tick) begin
          crossed  <= 1'b0;
          got_in   <= 1'b0;
          lat_fire <= 1'b0;
          if (cfg.is_synapse) begin
            dist_sr    <= sr_next;
            fire_out   <= syn_fire;
            w_out      <= weight;
            fired_prev <= fire_out;
            if (syn_fire && !capture) fire_cnt <= (fire_cnt == 8'hFF) ? fire_cnt : fire_cnt + 8'd1;
            if (ltp_cnt != '0) begin
              ltp_cnt <= ltp_cnt - 8'd1;
            end else if (out_fired) begin
              if (fired_prev) begin
                if (weight != 8'sd127) weight <= weight + 8'sd1;       // LTP
              end else begin
                if (weight != -8'sd128) weight <= weight - 8'sd1;      // LTD
              end
              ltp_cnt <= cfg.ltp_refrac;
            end
          end else begin
            if ((crossed || charge > thr_ext) && !refrac) begin
              fire_out <= 1'b1;
              w_out    <= cfg.thr_weight;
              charge   <= BIAS;
              refrac   <= 1'b1;
              if (!capture) fire_cnt <= (fire_cnt == 8'hFF) ? fire_cnt : fire_cnt + 8'd1;
            end else begin
              fire_out <= 1'b0;
              refrac   <= 1'b0;
            end
          end
        end
      end
    end
  end

  assign mon_out = mon_sr[MON_W-1];

endmodule
