// data_controller: the bus master of the device, in the FPGA part of the
// control unit's SoC. It runs the measurement sequence and gathers every
// card's results into a frame memory for the processor.
//
// At the start of every frame it writes the configuration: the PGA gain code
// of every electrode (gain_i, one per electrode) into the cards' gain cells,
// NELEC one-clock writes, and the excitation shape (shape_i) into the current
// source. Then, for each electrode pair
// p = 0 .. NPAIRS-1, it writes the pair and the current
// set point to the current source, reads the current source's status until
// the current is reported correct, broadcasts a start to all cards, and then,
// card by card, reads the status cell until the done bit is set and reads the
// NCH RMS cells and NCH phase cells. Every value goes into the frame memory at
// {bank, p, electrode, kind} (kind 0 = RMS, 1 = phase delay); the two
// electrodes that carry the current for pair p are stored as 0, since only
// the other electrodes are measured. After the last pair the bank is handed
// to the processor: data_ready_o is set (until hps_ack_i), frame_count_o
// advances, hps_rdata_o reads that bank one clock after hps_addr_i, and the
// next frame is collected into the other bank while run_i stays high.
//
// Bus cycles: a write is a one-clock wr strobe with address and data; a read
// is a one-clock rd strobe, and the slave's data is taken two clocks later.
// Only one slave drives the data lines at a time.
//
// The configuration writes to the cards, the pair-by-pair sequence, the current check before measuring, the
// collection of all cards' data into one memory and the ready flag to the
// processor follow the device description; the polling, the double-buffered
// frame memory and its layout are this design's own.
module data_controller
  import tomo_pkg::*;
#(
  parameter int NCARDS = 8,
  parameter int NCH    = 4,
  parameter int NELEC  = NCARDS * NCH,
  parameter int NPAIRS = NELEC,
  localparam int EW    = $clog2(NELEC),
  localparam int PW    = $clog2(NPAIRS),
  localparam int FAW   = PW + EW + 1          // frame address: {pair, electrode, kind}
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            run_i,
  input  logic [15:0]     setpoint_i,
  input  logic [GAIN_W-1:0] gain_i [NELEC],
  input  logic [1:0]      shape_i,
  // shared bus
  output bus_req_t        bus_o,
  input  logic [15:0]     bus_rdata_i,
  // processor side
  input  logic [FAW-1:0]  hps_addr_i,
  output logic [15:0]     hps_rdata_o,
  output logic            data_ready_o,
  input  logic            hps_ack_i,
  output logic [15:0]     frame_count_o,
  output logic            busy_o
);

  typedef enum logic [3:0] {
    S_IDLE, S_CFG, S_CFG_SHAPE, S_WR_PAIR, S_WR_SET, S_POLL_CS, S_CHK_CS, S_WR_START,
    S_POLL_CARD, S_CHK_CARD, S_RD_RES, S_STORE, S_NEXT, S_FRAME, S_RD_WAIT
  } state_t;

  localparam int CW = (NCARDS > 1) ? $clog2(NCARDS) : 1;
  localparam int WW = $clog2(2 * NCH);

  state_t         state, ret;
  logic [PW-1:0]  pair;
  logic [CW-1:0]  card;
  logic [WW-1:0]  word, wsub;
  logic [1:0]     rd_cnt;
  logic [15:0]    rdata_q;
  logic           wbank, rbank;

  logic [EW-1:0]  src, snk, elec;
  logic [3:0]     cell_of_word;
  logic           kind;

  logic           f_we;
  logic [FAW:0]   f_waddr;
  logic [15:0]    f_wdata;

  always_comb begin
    src          = EW'(pair);
    snk          = (src == EW'(NELEC - 1)) ? '0 : src + 1'b1;
    kind         = (word >= WW'(NCH));
    wsub         = kind ? WW'(word - WW'(NCH)) : word;
    elec         = EW'(card) * EW'(NCH) + EW'(wsub);
    cell_of_word = kind ? CELL_PHASE0 + 4'(word - WW'(NCH)) : CELL_RMS0 + 4'(word);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      ret           <= S_IDLE;
      pair          <= '0;
      card          <= '0;
      word          <= '0;
      rd_cnt        <= '0;
      rdata_q       <= '0;
      wbank         <= 1'b0;
      rbank         <= 1'b1;
      bus_o         <= '0;
      f_we          <= 1'b0;
      f_waddr       <= '0;
      f_wdata       <= '0;
      data_ready_o  <= 1'b0;
      frame_count_o <= '0;
    end else begin
      bus_o.wr <= 1'b0;
      bus_o.rd <= 1'b0;
      f_we     <= 1'b0;
      if (hps_ack_i) data_ready_o <= 1'b0;
      unique case (state)
        S_IDLE: if (run_i) begin
          pair  <= '0;
          card  <= '0;
          word  <= '0;
          state <= S_CFG;
        end
        S_CFG: begin
          bus_o <= '{addr: {1'b0, 3'(card), CELL_GAIN0 + 4'(word)}, wdata: 16'(gain_i[elec]),
                     wr: 1'b1, rd: 1'b0};
          word  <= word + 1'b1;
          if (word == WW'(NCH - 1)) begin
            word <= '0;
            card <= card + 1'b1;
            if (card == CW'(NCARDS - 1)) state <= S_CFG_SHAPE;
          end
        end
        S_CFG_SHAPE: begin
          bus_o <= '{addr: ADDR_CS_SHAPE, wdata: 16'(shape_i), wr: 1'b1, rd: 1'b0};
          state <= S_WR_PAIR;
        end
        S_WR_PAIR: begin
          bus_o <= '{addr: ADDR_CS_PAIR, wdata: 16'(pair), wr: 1'b1, rd: 1'b0};
          state <= S_WR_SET;
        end
        S_WR_SET: begin
          bus_o <= '{addr: ADDR_CS_SETPT, wdata: setpoint_i, wr: 1'b1, rd: 1'b0};
          state <= S_POLL_CS;
        end
        S_POLL_CS: begin
          bus_o  <= '{addr: ADDR_CS_STATUS, wdata: '0, wr: 1'b0, rd: 1'b1};
          rd_cnt <= '0;
          ret    <= S_CHK_CS;
          state  <= S_RD_WAIT;
        end
        S_CHK_CS: state <= rdata_q[0] ? S_WR_START : S_POLL_CS;
        S_WR_START: begin
          bus_o <= '{addr: ADDR_START, wdata: '0, wr: 1'b1, rd: 1'b0};
          card  <= '0;
          state <= S_POLL_CARD;
        end
        S_POLL_CARD: begin
          bus_o  <= '{addr: {1'b0, 3'(card), CELL_STATUS}, wdata: '0, wr: 1'b0, rd: 1'b1};
          rd_cnt <= '0;
          ret    <= S_CHK_CARD;
          state  <= S_RD_WAIT;
        end
        S_CHK_CARD: if (rdata_q[0]) begin
          word  <= '0;
          state <= S_RD_RES;
        end else begin
          state <= S_POLL_CARD;
        end
        S_RD_RES: begin
          bus_o  <= '{addr: {1'b0, 3'(card), cell_of_word}, wdata: '0, wr: 1'b0, rd: 1'b1};
          rd_cnt <= '0;
          ret    <= S_STORE;
          state  <= S_RD_WAIT;
        end
        S_STORE: begin
          f_we    <= 1'b1;
          f_waddr <= {wbank, pair, elec, kind};
          f_wdata <= (elec == src || elec == snk) ? 16'd0 : rdata_q;
          word    <= word + 1'b1;
          if (word == WW'(2 * NCH - 1)) begin
            card <= card + 1'b1;
            state <= (card == CW'(NCARDS - 1)) ? S_NEXT : S_POLL_CARD;
          end else begin
            state <= S_RD_RES;
          end
        end
        S_NEXT: if (pair == PW'(NPAIRS - 1)) begin
          state <= S_FRAME;
        end else begin
          pair  <= pair + 1'b1;
          state <= S_WR_PAIR;
        end
        S_FRAME: begin
          rbank         <= wbank;
          wbank         <= ~wbank;
          data_ready_o  <= 1'b1;
          frame_count_o <= frame_count_o + 1'b1;
          pair          <= '0;
          card          <= '0;
          word          <= '0;
          state         <= run_i ? S_CFG : S_IDLE;
        end
        S_RD_WAIT: begin
          rd_cnt <= rd_cnt + 1'b1;
          if (rd_cnt == 2'd2) begin
            rdata_q <= bus_rdata_i;
            state   <= ret;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy_o = (state != S_IDLE);

  sample_ram #(.W(16), .DEPTH(2 ** (FAW + 1))) u_frame (
    .clk, .we(f_we), .waddr(f_waddr), .wdata(f_wdata),
    .raddr({rbank, hps_addr_i}), .rdata(hps_rdata_o)
  );

endmodule
