// cfg_mem_model: behavioural model of a device's configuration memory and its
// frame-level configuration port, for simulation only.
//
// Holds NFRAMES frames of FRAME_WORDS words in the array mem (frame f, word w
// at index f*FRAME_WORDS + w), which testbenches preload and corrupt
// directly. Protocol, as the scrubber expects it: a command is taken when
// cmd_valid and cmd_ready are high; after a read command FRAME_WORDS words are
// returned in order with rvalid, with random gaps; after a write command
// FRAME_WORDS words are taken with wvalid && wready, wready random. Commands are
// refused while a transfer is running. STALL sets the percentage of cycles on
// which the model holds back (cmd_ready, rvalid, wready low). It counts reads
// and writes of whole frames.
module cfg_mem_model #(
  parameter int unsigned WORD_W      = 32,
  parameter int unsigned FRAME_WORDS = 81,
  parameter int unsigned NFRAMES     = 28464,
  parameter int unsigned STALL       = 20,
  localparam int unsigned FA_W = (NFRAMES > 1) ? $clog2(NFRAMES) : 1
) (
  input  logic              clk,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  logic              cmd_write,
  input  logic [FA_W-1:0]   cmd_frame,
  output logic              rvalid,
  output logic [WORD_W-1:0] rdata,
  input  logic              wvalid,
  output logic              wready,
  input  logic [WORD_W-1:0] wdata
);
  logic [WORD_W-1:0] mem [NFRAMES * FRAME_WORDS];
  int reads = 0, writes = 0;

  typedef enum {M_IDLE, M_READ, M_WRITE} mstate_e;
  mstate_e mstate = M_IDLE;
  int base = 0, cnt = 0;

  initial begin
    cmd_ready = 0; rvalid = 0; rdata = 0; wready = 0;
  end

  always @(posedge clk) begin
    // decisions for the cycle that follows this edge
    case (mstate)
      M_IDLE: if (cmd_valid && cmd_ready) begin
        base   = int'(cmd_frame) * FRAME_WORDS;
        cnt    = 0;
        mstate = cmd_write ? M_WRITE : M_READ;
      end
      M_READ: if (rvalid) begin
        cnt++;
        if (cnt == FRAME_WORDS) begin mstate = M_IDLE; reads++; end
      end
      M_WRITE: if (wvalid && wready) begin
        mem[base + cnt] = wdata;
        cnt++;
        if (cnt == FRAME_WORDS) begin mstate = M_IDLE; writes++; end
      end
      default: mstate = M_IDLE;
    endcase
    cmd_ready <= (mstate == M_IDLE) && ($urandom_range(99) >= STALL);
    wready    <= (mstate == M_WRITE) && ($urandom_range(99) >= STALL);
    if (mstate == M_READ && $urandom_range(99) >= STALL) begin
      rvalid <= 1'b1;
      rdata  <= mem[base + cnt];
    end else begin
      rvalid <= 1'b0;
    end
  end
endmodule
