// i2c_master_ctrl: bit and byte sequencer of the I2C master bus controller.
//
// Single-master controller: it starts every transfer and drives SCL. A host
// asks for a transfer by raising `enable` with the slave address, the
// direction flag `rw` (1 = read) and, for writes, `data_in`. The controller
// then puts on the bus: START, the address with the direction bit, the
// slave's acknowledge, data bytes each followed by an acknowledge bit, and
// STOP. Bytes go MSB first.
//
// Addressing:
//   7-bit  (ten_bit = 0): address byte = {addr_in[7:1], rw}; addr_in[0] and
//          addr_hi are not used (rw takes the place of bit 0).
//   10-bit (ten_bit = 1): address A9..A0 = {addr_hi, addr_in}. The master
//          sends {11110, A9, A8, 0} and then A7..A0; for a read it follows
//          with a repeated START and {11110, A9, A8, 1} before the data.
//
// Timing: the controller moves one quarter of an SCL period per `tick`
// (from i2c_clk_gen). In a bit slot SCL is low for quarters 0-1 and high for
// quarters 2-3; SDA changes only at the start of quarter 1 and is sampled at
// the end of quarter 3. START and STOP each take one slot, a repeated START
// two, and STOP is followed by a one-slot bus-free gap. With a 2.5 us
// quarter (100 kHz) this meets the standard-mode set-up and hold times.
// A byte plus its acknowledge takes 36 quarters.
//
// Host handshake:
//   data_req - one-cycle pulse when a data byte begins. For a write, data_in
//              is captured at this pulse. After it the host may present the
//              next data_in and say what follows the current byte through
//              enable and the address inputs, which are sampled when the
//              byte's eighth bit ends: enable low -> STOP; same address and
//              direction -> another data byte; anything else -> repeated
//              START with the new address. A read byte is acknowledged only
//              when another read byte follows.
//   rd_valid - one-cycle pulse with data_out holding the byte just read.
//   ack_error- set when the slave does not acknowledge an address byte or a
//              written byte; the controller then ends the transfer with STOP.
//              Cleared when the next transfer starts.
//   busy     - high from the request until the bus-free gap after STOP ends.
// Bus side: scl_low / sda_low are registered pull-down drives (open drain);
// scl_in / sda_in are the line levels, already synchronised. `stretch` asks
// the tick generator to wait while SCL is released but still held low by a
// slave (clock stretching).
//
// Following the document: the master role, the inputs clk, reset, addr_in,
// data_in and R/W, the START condition, the address with its direction bit,
// an acknowledge after every byte, 7- and 10-bit addresses. This design's
// own choices: the host handshake, repeated START, the quarter timing, the
// STOP on a missing acknowledge and the support for clock stretching.
module i2c_master_ctrl (
  input  logic       clk,
  input  logic       rst,        // synchronous, active high
  input  logic       tick,       // end of a quarter SCL period
  // host side
  input  logic       enable,
  input  logic       ten_bit,
  input  logic [1:0] addr_hi,
  input  logic [7:0] addr_in,
  input  logic       rw,
  input  logic [7:0] data_in,
  output logic       busy,
  output logic       data_req,
  output logic [7:0] data_out,
  output logic       rd_valid,
  output logic       ack_error,
  // bus side
  input  logic       scl_in,
  input  logic       sda_in,
  output logic       scl_low,
  output logic       sda_low,
  output logic       run,        // tick generator enable
  output logic       stretch     // tick generator hold
);
  import i2c_pkg::*;

  state_t     state;
  next_t      nxt;
  logic [1:0] q;           // quarter inside the current slot
  logic [2:0] bit_cnt;     // bits left in the byte after the current one
  logic [7:0] shreg;       // shift register, MSB on the bus first
  xfer_addr_t cur;         // address and direction of the running transfer
  logic       rx_mode;     // current byte is read from the slave
  logic       addr_phase;  // current byte is an address byte
  logic [1:0] a_step;      // which address byte: 0 first, 1 A7..A0, 2 read header
  logic       hdr_read;    // next START is the internal one of a 10-bit read
  logic       ack_send;    // master acknowledges the byte it just read

  xfer_addr_t req;
  logic       same_req;
  always_comb begin
    req.ten  = ten_bit;
    req.hi   = ten_bit ? addr_hi : 2'b00;
    req.lo   = ten_bit ? addr_in : {addr_in[7:1], 1'b0};
    req.rw   = rw;
  end
  assign same_req = enable && (req == cur);

  // first byte sent after a START
  logic [7:0] first_byte;
  assign first_byte = hdr_read ? {TEN_BIT_PREFIX, cur.hi, 1'b1} :
                      cur.ten  ? {TEN_BIT_PREFIX, cur.hi, 1'b0} :
                                 {cur.lo[7:1], cur.rw};

  // what the acknowledge slot of an address byte leads to
  logic addr_done, addr_to_rx;
  assign addr_done  = !cur.ten || a_step == 2'd2 || (a_step == 2'd1 && !cur.rw);
  assign addr_to_rx = cur.rw;

  assign run     = (state != S_IDLE);
  assign stretch = !scl_low && !scl_in;

  always_ff @(posedge clk) begin
    data_req <= 1'b0;
    rd_valid <= 1'b0;
    if (rst) begin
      state      <= S_IDLE;
      nxt        <= N_STOP;
      q          <= '0;
      bit_cnt    <= '0;
      shreg      <= '0;
      cur        <= '0;
      rx_mode    <= 1'b0;
      addr_phase <= 1'b0;
      a_step     <= '0;
      hdr_read   <= 1'b0;
      ack_send   <= 1'b0;
      scl_low    <= 1'b0;
      sda_low    <= 1'b0;
      busy       <= 1'b0;
      ack_error  <= 1'b0;
      data_out   <= '0;
    end else if (state == S_IDLE) begin
      q        <= '0;
      scl_low  <= 1'b0;
      sda_low  <= 1'b0;
      hdr_read <= 1'b0;
      if (enable) begin
        state     <= S_START;
        busy      <= 1'b1;
        ack_error <= 1'b0;
        cur       <= req;
      end
    end else if (tick) begin
      q <= q + 2'd1;
      unique case (state)
        // quarters 0-1: both lines high; 2-3: SDA low with SCL high
        S_START: begin
          if (q == 2'd1) sda_low <= 1'b1;
          if (q == 2'd3) begin
            scl_low    <= 1'b1;
            state      <= S_BIT;
            shreg      <= first_byte;
            bit_cnt    <= 3'd7;
            rx_mode    <= 1'b0;
            addr_phase <= 1'b1;
            a_step     <= hdr_read ? 2'd2 : 2'd0;
            hdr_read   <= 1'b0;
          end
        end

        S_BIT: begin
          unique case (q)
            2'd0: sda_low <= rx_mode ? 1'b0 : !shreg[7];
            2'd1: scl_low <= 1'b0;
            2'd2: ;
            2'd3: begin
              scl_low <= 1'b1;
              shreg   <= {shreg[6:0], rx_mode ? sda_in : 1'b0};
              if (bit_cnt != 3'd0) begin
                bit_cnt <= bit_cnt - 3'd1;
              end else begin
                state <= S_ACK;
                if (rx_mode) begin
                  data_out <= {shreg[6:0], sda_in};
                  rd_valid <= 1'b1;
                  ack_send <= same_req;
                  nxt      <= same_req ? N_DATA : (enable ? N_RESTART : N_STOP);
                end else begin
                  ack_send <= 1'b0;
                  nxt      <= !enable ? N_STOP : (same_req && !cur.rw) ? N_DATA : N_RESTART;
                end
              end
            end
          endcase
        end

        S_ACK: begin
          unique case (q)
            2'd0: sda_low <= ack_send;
            2'd1: scl_low <= 1'b0;
            2'd2: ;
            2'd3: begin
              scl_low <= 1'b1;
              if (!rx_mode && sda_in) begin
                // no acknowledge from the slave: give up the transfer
                ack_error <= 1'b1;
                state     <= S_STOP;
              end else if (addr_phase && !addr_done) begin
                if (a_step == 2'd0) begin
                  // 10-bit address: second byte A7..A0
                  state   <= S_BIT;
                  shreg   <= cur.lo;
                  bit_cnt <= 3'd7;
                  a_step  <= 2'd1;
                end else begin
                  // 10-bit read: repeated START, then the header with R
                  state    <= S_RESTART;
                  hdr_read <= 1'b1;
                end
              end else if ((addr_phase && !addr_to_rx) || (!addr_phase && !rx_mode && nxt == N_DATA)) begin
                state      <= S_BIT;
                bit_cnt    <= 3'd7;
                rx_mode    <= 1'b0;
                addr_phase <= 1'b0;
                shreg      <= data_in;
                data_req   <= 1'b1;
              end else if (addr_phase || (rx_mode && nxt == N_DATA)) begin
                state      <= S_BIT;
                bit_cnt    <= 3'd7;
                rx_mode    <= 1'b1;
                addr_phase <= 1'b0;
                data_req   <= 1'b1;
              end else if (nxt == N_RESTART) begin
                state <= S_RESTART;
              end else begin
                state <= S_STOP;
              end
            end
          endcase
        end

        // SCL low, SDA released, then SCL released: ready for a new START
        S_RESTART: begin
          if (q == 2'd0) sda_low <= 1'b0;
          if (q == 2'd1) scl_low <= 1'b0;
          if (q == 2'd3) begin
            state <= S_START;
            if (!hdr_read) cur <= req;
          end
        end

        // SCL low, SDA pulled low, SCL released, then SDA released: STOP
        S_STOP: begin
          if (q == 2'd0) sda_low <= 1'b1;
          if (q == 2'd1) scl_low <= 1'b0;
          if (q == 2'd3) begin
            sda_low <= 1'b0;
            state   <= S_BUSFREE;
          end
        end

        S_BUSFREE: begin
          if (q == 2'd3) begin
            state <= S_IDLE;
            busy  <= 1'b0;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // Bus rules: with SCL released, SDA may only move to make a START
  // (falling, in S_START) or a STOP (rising, on the way into S_BUSFREE).
  a_sda_stable: assert property (@(posedge clk) disable iff (rst)
    (!scl_low && $changed(sda_low)) |-> (state == S_START || state == S_BUSFREE));
  // Host strobes only come during a transfer and never together.
  a_strobes: assert property (@(posedge clk) disable iff (rst)
    (data_req || rd_valid) |-> (busy && !(data_req && rd_valid)));
endmodule
