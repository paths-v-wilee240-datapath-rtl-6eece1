// data_memory: the WileE240's 256 x 16-bit memory, holding program and data,
// with its parallel-port program loader.
//
// CPU side (clock domain "clock"): the word at addr is always on rdata
// (combinational read), and on a rising clock edge with we high the word at
// addr takes wdata. The datapath addresses it with the low 8 bits of MAR and
// writes the MDR, so a write issued in one control state uses the MAR and
// MDR values set up by the states before it. This read/write timing is what
// the original control sequences require (MDR loads from memory in the same
// cycle as the read is issued; MAR may change in the very cycle of a write).
//
// Loader side: a parport_loader in the clk25 domain delivers words through a
// toggle handshake. Its request toggle is synchronised here with two flops;
// each change writes wr_data to wr_addr and is echoed on wr_ack. Changes seen
// while reset is high (CPU running) are only tracked, not written, so the two
// toggles agree before a download starts. The host should start only after
// busy falls. A loader write takes priority over a CPU write in the same
// cycle; the two do not meet in use, since the CPU is held in reset while a
// download runs.
//
// reset is an asynchronous input here: it is only sampled through
// synchronisers, while the CPU registers use it as an asynchronous reset.
//
// The depth, the width, the parallel-port signal names and the two clocks
// follow the original; the protocol, the handshake and the read/write
// timing are this design's choices.
module data_memory #(
  parameter int unsigned DEPTH      = 256,
  parameter int unsigned WIDTH      = 16,
  parameter int unsigned ACK_CYCLES = 4
) (
  input  logic                     clock,
  input  logic                     reset,    // active low; low = load mode
  // CPU port
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     we,
  output logic [WIDTH-1:0]         rdata,
  // parallel port
  input  logic                     clk25,
  input  logic [7:0]               pport,
  input  logic                     stbl,
  output logic                     ackl,
  output logic                     busy,
  output logic                     pe,
  output logic [$clog2(DEPTH)-1:0] addr_p
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  logic          wr_req, wr_ack;
  logic [AW-1:0] ld_addr;
  logic [WIDTH-1:0] ld_data;

  parport_loader #(.DEPTH(DEPTH), .WIDTH(WIDTH), .ACK_CYCLES(ACK_CYCLES)) loader (
    .clk25, .reset, .pport, .stbl, .ackl, .busy, .pe, .addr_p,
    .wr_req, .wr_ack, .wr_addr(ld_addr), .wr_data(ld_data)
  );

  // Clock-domain crossing of the loader's request toggle.
  logic [1:0] req_sync;
  logic [1:0] mode_sync;
  logic       req_seen;
  wire        ld_write = mode_sync[1] && (req_sync[1] != req_seen);

  always_ff @(posedge clock) begin
    req_sync  <= {req_sync[0], wr_req};
    mode_sync <= {mode_sync[0], ~reset};
    req_seen  <= req_sync[1];
  end
  assign wr_ack = req_seen;

  always_ff @(posedge clock) begin
    if (ld_write)  mem[ld_addr] <= ld_data;
    else if (we)   mem[addr]    <= wdata;
  end

  assign rdata = mem[addr];
endmodule
