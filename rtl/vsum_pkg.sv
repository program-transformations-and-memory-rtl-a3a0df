// vsum_pkg: types and constants shared by the tiled vector-sum accelerator.
//
// The accelerator talks to external DDR memory through a simple pipelined
// word-addressed master port: a request (read or write, address, write data)
// is accepted in a cycle where the slave does not assert waitrequest, and read
// data comes back later, in request order, with readdatavalid. The request and
// response halves of that port are bundled as packed structs so that the four
// DDR-accessing processes, the arbiter and the top can share one definition.
// Word width (32-bit int elements) follows the document's C code; the port
// protocol itself is this design's own choice.
package vsum_pkg;

  localparam int unsigned DATA_W = 32;  // int elements
  localparam int unsigned ADDR_W = 22;  // word address: 16 MB DDR / 4 bytes

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // Master -> slave
  typedef struct packed {
    logic  read;
    logic  write;
    addr_t address;
    word_t writedata;
  } mem_req_t;

  // Slave -> master
  typedef struct packed {
    logic  waitrequest;
    word_t readdata;
    logic  readdatavalid;
  } mem_rsp_t;

  // Kernel performed by the compute process.
  typedef enum logic [0:0] {
    KERNEL_VSUM = 1'b0,   // c[i] = a[i] + b[i]  (loads a and b)
    KERNEL_COPY = 1'b1    // c[i] = a[i]         (DMA: loads a only)
  } kernel_e;

  localparam mem_req_t MEM_REQ_IDLE = '{read: 1'b0, write: 1'b0, address: '0, writedata: '0};

endpackage
