// oversampler: x16 interpolator for the PCM stream (M = 16).
//
// Four x2 polyphase FIR stages are cascaded (orders 32, 11, 5, 3, equiripple
// design), and all of them share one mac_unit that performs one product per
// clock. A sequencer walks the coefficient program of amp_pkg stage by stage:
//   stage 1: one input sample -> 2 outputs (into work buffer 0)
//   stage 2: 2 inputs -> 4 outputs        (into work buffer 1)
//   stage 3: 4 inputs -> 8 outputs        (into work buffer 0)
//   stage 4: 8 inputs -> 16 outputs       (into the output FIFO)
// Zero padding is never materialised: each output phase uses only its own
// polyphase branch, and the zero taps of the half-band first stage are
// skipped, so a frame costs 97 MAC cycles.
//
// The MAC is kept busy on every cycle of a frame. A branch result is rounded
// and stored in the cycle after its last product, while the first product of
// the next branch is already being issued (the accumulator still holds the
// finished sum during that cycle). The next input of a stage is shifted into
// its delay line on the clock edge that ends the last product of the
// previous branch; that product has already read the old contents. A frame
// therefore keeps the sequencer busy for 98 clocks after the cycle that
// accepts the input (97 MAC cycles and the final store), and one input can be
// taken every 99 clocks: 4.4 MHz of MAC clock for 44.1 kS/s input and
// 9.5 MHz for 96 kS/s.
//
// Interface: 'in_valid/in_ready/in_data' accept one PCM sample; the sequencer
// only accepts a sample when it is idle and the output FIFO has room for the
// 16 results. 'out_valid/out_ready/out_data' is a FIFO read port (first-word
// fall-through; a word is removed in a cycle where both are high). Outputs are
// rounded to the input width PCM_W (16 for CD, up to 24 for DVD audio) and
// saturated; the MAC accumulator is PCM_W + 18 bits. 'frame_busy' is high while a frame is
// computed.
//
// From the published design: the factor 16, the 4-stage polyphase equiripple
// cascade with the filter orders of its mask-2 design, the single
// 1-MAC/cycle unit below 10 MHz and the 12-bit coefficient width. This
// design's choices: the coefficients themselves (designed to that mask), the
// stage-by-stage schedule, the FIFO and its handshake, rounding and
// saturation.
module oversampler
  import amp_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 32,  // output samples buffered, >= 2*OSR
  parameter int unsigned PCM_W      = DATA_W  // sample width n, 16..24
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  logic signed [PCM_W-1:0] in_data,
  output logic    out_valid,
  input  logic    out_ready,
  output logic signed [PCM_W-1:0] out_data,
  output logic    frame_busy
);

  localparam int unsigned PW = $clog2(FIFO_DEPTH);
  localparam int unsigned AW = PCM_W + COEF_W + 6;  // 34 bits for n = 16

  typedef logic signed [PCM_W-1:0] smp_t;
  typedef logic signed [AW-1:0]    wacc_t;

  // Saturate a wide value to the sample width.
  function automatic smp_t sat(input wacc_t v);
    localparam wacc_t MAXV = (AW'(1) <<< (PCM_W-1)) - 1;
    localparam wacc_t MINV = -(AW'(1) <<< (PCM_W-1));
    if (v > MAXV)      return smp_t'(MAXV);
    else if (v < MINV) return smp_t'(MINV);
    else               return smp_t'(v);
  endfunction

  // issue side: the branch whose products are being issued
  logic        running;
  logic [1:0]  stage;      // 0..3
  logic [3:0]  idx;        // input index within the stage
  logic        phase;      // polyphase branch being computed
  logic [5:0]  entry;      // program counter
  logic [4:0]  left;       // products still to issue in this branch
  logic        last;       // this cycle issues the branch's last product

  // store side: the branch whose sum is in the accumulator
  logic        wr_pend;
  logic [1:0]  wr_stage;
  logic [2:0]  wr_addr;

  smp_t dl   [DL_TOTAL];          // delay lines of all stages
  smp_t wbuf [2][8];              // ping-pong work buffers

  // output FIFO
  smp_t       fifo [FIFO_DEPTH];
  logic [PW:0]   count;
  logic [PW-1:0] wr_ptr, rd_ptr;
  logic          fifo_push, fifo_pop;
  smp_t       result;

  // MAC operands
  prg_entry_t  cur;
  logic        mac_clr;
  wacc_t        acc;
  smp_t     mac_a;

  always_comb begin
    cur     = PRG[entry];
    mac_a   = dl[5'(DL_BASE[stage]) + cur.tap];
    mac_clr = (entry == 6'(PRG_FIRST[stage][phase]));
    last    = running && (left == 5'd1);
  end

  mac_unit #(.A_W(PCM_W), .ACC_WIDTH(AW)) u_mac (
    .clk, .rst_n,
    .en (running),
    .clr(mac_clr),
    .a  (mac_a),
    .b  (cur.coef),
    .acc(acc)
  );

  // Round to nearest and drop the coefficient fraction bits.
  always_comb result = sat((acc + (wacc_t'(1) <<< (COEF_FRAC-1))) >>> COEF_FRAC);

  assign frame_busy = running || wr_pend;
  assign in_ready   = !frame_busy && (count <= (PW+1)'(FIFO_DEPTH - OSR));
  assign out_valid  = (count != 0);
  assign out_data   = fifo[rd_ptr];
  assign fifo_pop   = out_valid && out_ready;
  assign fifo_push  = wr_pend && (wr_stage == 2'(N_STAGES-1));

  function automatic logic [5:0] first_of(input logic [1:0] s, input logic p);
    return 6'(PRG_FIRST[s][p]);
  endfunction
  function automatic logic [4:0] count_of(input logic [1:0] s, input logic p);
    return 5'(PRG_COUNT[s][p]);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running  <= 1'b0;
      stage    <= '0;
      idx      <= '0;
      phase    <= 1'b0;
      entry    <= '0;
      left     <= '0;
      wr_pend  <= 1'b0;
      wr_stage <= '0;
      wr_addr  <= '0;
      for (int j = 0; j < DL_TOTAL; j++) dl[j] <= '0;
      for (int b = 0; b < 2; b++)
        for (int j = 0; j < 8; j++) wbuf[b][j] <= '0;
    end else begin
      // store side
      wr_pend <= last;
      if (last) begin
        wr_stage <= stage;
        wr_addr  <= {idx[1:0], phase};
      end
      if (wr_pend && wr_stage != 2'(N_STAGES-1))
        wbuf[wr_stage[0]][wr_addr] <= result;

      // issue side
      if (!running) begin
        if (in_valid && in_ready) begin
          for (int j = 1; j < DL_LEN[0]; j++) dl[DL_BASE[0]+j] <= dl[DL_BASE[0]+j-1];
          dl[DL_BASE[0]] <= in_data;
          running <= 1'b1;
          stage   <= 2'd0;
          idx     <= '0;
          phase   <= 1'b0;
          entry   <= first_of(2'd0, 1'b0);
          left    <= count_of(2'd0, 1'b0);
        end
      end else if (!last) begin
        entry <= entry + 6'd1;
        left  <= left - 5'd1;
      end else if (!phase) begin
        // same input, other polyphase branch
        phase <= 1'b1;
        entry <= first_of(stage, 1'b1);
        left  <= count_of(stage, 1'b1);
      end else if (idx != (4'd1 << stage) - 4'd1) begin
        // next input of this stage: shift it in as the last product reads
        for (int s = 1; s < N_STAGES; s++)
          if (stage == 2'(s)) begin
            for (int j = 1; j < DL_LEN[s]; j++) dl[DL_BASE[s]+j] <= dl[DL_BASE[s]+j-1];
            dl[DL_BASE[s]] <= wbuf[~stage[0]][idx[2:0] + 3'd1];
          end
        idx   <= idx + 4'd1;
        phase <= 1'b0;
        entry <= first_of(stage, 1'b0);
        left  <= count_of(stage, 1'b0);
      end else if (stage != 2'(N_STAGES-1)) begin
        // first input of the next stage, from the buffer this stage filled
        for (int s = 1; s < N_STAGES; s++)
          if (stage + 2'd1 == 2'(s)) begin
            for (int j = 1; j < DL_LEN[s]; j++) dl[DL_BASE[s]+j] <= dl[DL_BASE[s]+j-1];
            dl[DL_BASE[s]] <= wbuf[stage[0]][0];
          end
        stage <= stage + 2'd1;
        idx   <= '0;
        phase <= 1'b0;
        entry <= first_of(stage + 2'd1, 1'b0);
        left  <= count_of(stage + 2'd1, 1'b0);
      end else begin
        running <= 1'b0;
      end
    end
  end

  // Output FIFO
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (fifo_push) wr_ptr <= wr_ptr + 1'b1;
      if (fifo_pop)  rd_ptr <= rd_ptr + 1'b1;
      count <= count + (PW+1)'(fifo_push) - (PW+1)'(fifo_pop);
    end
  end

  always_ff @(posedge clk) if (fifo_push) fifo[wr_ptr] <= result;

  // The sequencer never overfills the FIFO.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  fifo_push |-> count != (PW+1)'(FIFO_DEPTH) || fifo_pop);

endmodule
