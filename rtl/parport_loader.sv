// parport_loader: receives a program image from a host's parallel port and
// hands it to the memory one 16-bit word at a time.
//
// The original design names the port signals of its memory (data byte
// pport, strobe stbl, acknowledge ackl, busy, pe, the displayed address
// addr_p and a 25 MHz clock clk25) but not their protocol; the protocol here
// is this design's choice, modelled on the peripheral side of the standard
// "compatibility mode" printer handshake:
//   * Loading is enabled while the CPU is held in reset (reset low). While
//     reset is high the loader is idle with busy high, and its word address
//     and byte phase return to zero, so every download starts at address 0.
//   * The host waits for busy low, puts a byte on pport and pulses stbl low.
//   * The loader samples stbl through a two-flop synchroniser, latches the
//     byte on its falling edge and raises busy. Bytes arrive high byte first;
//     every second byte completes a word for address addr_p.
//   * A completed word is passed to the memory's clock domain with a toggle
//     handshake: wr_addr/wr_data are held stable, wr_req toggles, and the
//     memory toggles wr_ack back once it has written the word.
//   * ackl then goes low for ACK_CYCLES clk25 cycles and busy falls with it.
//   * pe ("paper end") goes high once DEPTH words have been loaded; further
//     bytes are acknowledged and dropped.
// All timing is in clk25 cycles: about 2 cycles from strobe to busy, plus
// the memory handshake (about 3 clock cycles and 2 clk25 cycles), plus
// ACK_CYCLES.
module parport_loader #(
  parameter int unsigned DEPTH      = 256,
  parameter int unsigned WIDTH      = 16,
  parameter int unsigned ACK_CYCLES = 4
) (
  input  logic                     clk25,
  input  logic                     reset,     // active low: low = load mode
  input  logic [7:0]               pport,
  input  logic                     stbl,
  output logic                     ackl,
  output logic                     busy,
  output logic                     pe,
  output logic [$clog2(DEPTH)-1:0] addr_p,
  // toward the memory's clock domain
  output logic                     wr_req,    // toggles once per word
  input  logic                     wr_ack,    // toggled back by the memory
  output logic [$clog2(DEPTH)-1:0] wr_addr,
  output logic [WIDTH-1:0]         wr_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  typedef enum logic [2:0] {S_OFF, S_IDLE, S_WRITE, S_ACK} state_t;
  state_t state;

  logic [1:0] mode_sync;     // synchronised ~reset
  logic [2:0] stb_sync;      // synchronised stbl, oldest in bit 2
  logic [1:0] ack_sync;      // synchronised wr_ack
  logic       phase;         // 0: next byte is a high byte
  logic [7:0] hi_byte;
  logic       full;
  logic [$clog2(ACK_CYCLES+1)-1:0] ack_cnt;

  wire load_mode = mode_sync[1];
  wire stb_fall  = stb_sync[2] & ~stb_sync[1];

  always_ff @(posedge clk25) begin
    mode_sync <= {mode_sync[0], ~reset};
    stb_sync  <= {stb_sync[1:0], stbl};
    ack_sync  <= {ack_sync[0], wr_ack};
  end

  always_ff @(posedge clk25) begin
    if (!load_mode) begin
      state   <= S_OFF;
      phase   <= 1'b0;
      addr_p  <= '0;
      full    <= 1'b0;
      ack_cnt <= '0;
    end else begin
      unique case (state)
        S_OFF: state <= S_IDLE;
        S_IDLE: if (stb_fall) begin
          if (full) begin
            state <= S_ACK;                 // drop bytes past the end
          end else if (!phase) begin
            hi_byte <= pport;
            phase   <= 1'b1;
            state   <= S_ACK;
          end else begin
            wr_data <= {hi_byte, pport};
            wr_addr <= addr_p;
            wr_req  <= ~wr_req;
            phase   <= 1'b0;
            state   <= S_WRITE;
          end
          ack_cnt <= '0;
        end
        S_WRITE: if (ack_sync[1] == wr_req) begin
          if (addr_p == AW'(DEPTH - 1)) full <= 1'b1;
          addr_p <= addr_p + 1'b1;
          state  <= S_ACK;
        end
        S_ACK: begin
          ack_cnt <= ack_cnt + 1'b1;
          if (ack_cnt == ($bits(ack_cnt))'(ACK_CYCLES - 1)) state <= S_IDLE;
        end
        default: state <= S_OFF;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign ackl = (state != S_ACK);
  assign pe   = full;
endmodule
