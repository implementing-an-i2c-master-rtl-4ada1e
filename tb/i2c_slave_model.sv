// i2c_slave_model: behavioural I2C slave with a register file, for testbenches.
//
// Stands in for an off-chip slave such as a real-time clock. It oversamples
// the bus lines on the system clock, detects START, STOP and SCL edges, and
// answers its 7-bit address ADDR:
//   write transfer - the first data byte sets the register pointer, every
//                    further byte is stored at the pointer, which then
//                    increments (the usual RTC / EEPROM register access);
//   read transfer  - returns the register at the pointer and increments,
//                    for as long as the master acknowledges.
// With TEN_BIT = 1 it answers the 10-bit address ADDR10 instead: header
// 11110 A9 A8 W, then A7..A0; a read is a repeated START with header
// 11110 A9 A8 R after that. Every byte it receives is acknowledged. After each acknowledge bit it
// holds SCL low for STRETCH clocks (clock stretching; 0 = never).
// Outputs scl_pull / sda_pull are open-drain drives (1 = pull low).
// Counters n_start, n_stop, n_wr, n_rd, n_stretch let a testbench see what
// happened on the bus.
module i2c_slave_model #(
  parameter logic [6:0]  ADDR    = 7'h68,
  parameter int unsigned STRETCH = 0,
  parameter int unsigned NREG    = 64,
  parameter bit          TEN_BIT = 1'b0,
  parameter logic [9:0]  ADDR10  = 10'h000
) (
  input  logic clk,
  input  logic rst,
  input  logic scl,
  input  logic sda,
  output logic scl_pull,
  output logic sda_pull
);
  typedef enum logic [3:0] {
    SL_IDLE, SL_ADDR, SL_ADDR_ACK, SL_WR, SL_WR_ACK, SL_RD, SL_RD_ACK,
    SL_HDR_ACK, SL_ADDR2
  } sl_state_t;

  sl_state_t  st;
  logic       scl_d, sda_d;
  logic [3:0] bitn;
  logic [7:0] shreg, tx;
  logic [5:0] ptr;
  logic       ptr_set, rnw, m_ack, sel10;
  int unsigned stretch_cnt;

  logic [7:0] regs [NREG];

  int n_start, n_stop, n_wr, n_rd, n_stretch, n_addr_match;

  logic start_c, stop_c, rise, fall;
  assign start_c = scl && scl_d && sda_d && !sda;
  assign stop_c  = scl && scl_d && !sda_d && sda;
  assign rise    = scl && !scl_d;
  assign fall    = !scl && scl_d;

  initial begin
    for (int i = 0; i < NREG; i++) regs[i] = 8'(i * 7 + 3);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st <= SL_IDLE; scl_d <= 1'b1; sda_d <= 1'b1; bitn <= '0; shreg <= '0; tx <= '0;
      ptr <= '0; ptr_set <= 1'b0; sel10 <= 1'b0; rnw <= 1'b0; m_ack <= 1'b0;
      scl_pull <= 1'b0; sda_pull <= 1'b0; stretch_cnt <= 0;
      n_start <= 0; n_stop <= 0; n_wr <= 0; n_rd <= 0; n_stretch <= 0; n_addr_match <= 0;
    end else begin
      scl_d <= scl;
      sda_d <= sda;
      if (stretch_cnt != 0) begin
        stretch_cnt <= stretch_cnt - 1;
        if (stretch_cnt == 1) scl_pull <= 1'b0;
      end
      if (start_c) begin
        n_start <= n_start + 1;
        st <= SL_ADDR; bitn <= '0; sda_pull <= 1'b0;
      end else if (stop_c) begin
        n_stop <= n_stop + 1;
        st <= SL_IDLE; sda_pull <= 1'b0; sel10 <= 1'b0;
      end else if (rise) begin
        unique case (st)
          SL_ADDR, SL_ADDR2, SL_WR: begin shreg <= {shreg[6:0], sda}; bitn <= bitn + 1; end
          SL_RD:          bitn <= bitn + 1;
          SL_RD_ACK:      m_ack <= !sda;
          default: ;
        endcase
      end else if (fall) begin
        unique case (st)
          SL_ADDR: if (bitn == 8 && TEN_BIT) begin
            if (shreg[7:1] == {5'b11110, ADDR10[9:8]} && !shreg[0]) begin
              sda_pull <= 1'b1; st <= SL_HDR_ACK; sel10 <= 1'b0;
            end else if (shreg[7:1] == {5'b11110, ADDR10[9:8]} && sel10) begin
              sda_pull <= 1'b1; rnw <= 1'b1; st <= SL_ADDR_ACK;
              n_addr_match <= n_addr_match + 1;
            end else begin
              st <= SL_IDLE; sel10 <= 1'b0;
            end
          end else if (bitn == 8) begin
            if (shreg[7:1] == ADDR) begin
              sda_pull <= 1'b1; rnw <= shreg[0]; st <= SL_ADDR_ACK;
              n_addr_match <= n_addr_match + 1;
              if (!shreg[0]) ptr_set <= 1'b0;
            end else st <= SL_IDLE;
          end
          SL_HDR_ACK: begin sda_pull <= 1'b0; bitn <= '0; st <= SL_ADDR2; end
          SL_ADDR2: if (bitn == 8) begin
            if (shreg == ADDR10[7:0]) begin
              sda_pull <= 1'b1; sel10 <= 1'b1; rnw <= 1'b0; ptr_set <= 1'b0;
              st <= SL_ADDR_ACK; n_addr_match <= n_addr_match + 1;
            end else st <= SL_IDLE;
          end
          SL_WR: if (bitn == 8) begin
            sda_pull <= 1'b1; st <= SL_WR_ACK;
            if (!ptr_set) begin ptr <= shreg[5:0]; ptr_set <= 1'b1; end
            else begin regs[ptr] <= shreg; ptr <= ptr + 1; n_wr <= n_wr + 1; end
          end
          SL_ADDR_ACK, SL_WR_ACK, SL_RD_ACK: begin
            if (STRETCH != 0) begin
              scl_pull <= 1'b1; stretch_cnt <= STRETCH; n_stretch <= n_stretch + 1;
            end
            bitn <= '0;
            if ((st == SL_ADDR_ACK && rnw) || (st == SL_RD_ACK && m_ack)) begin
              st <= SL_RD; tx <= regs[ptr]; sda_pull <= !regs[ptr][7];
              ptr <= ptr + 1; n_rd <= n_rd + 1;
            end else if (st == SL_RD_ACK) begin
              st <= SL_IDLE; sda_pull <= 1'b0;
            end else begin
              st <= SL_WR; sda_pull <= 1'b0;
            end
          end
          SL_RD: begin
            if (bitn == 8) begin sda_pull <= 1'b0; st <= SL_RD_ACK; end
            else sda_pull <= !tx[3'(7 - bitn)];
          end
          default: ;
        endcase
      end
    end
  end
endmodule
